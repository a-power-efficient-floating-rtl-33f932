// tb_srt_divider: self-checking test of the radix-4 SRT significand divider.
//
// Drives random and corner-case divisor/dividend pairs (dividend aligned below
// the divisor as the floating-point divider does) and compares quotient and
// remainder-nonzero flag with a 128-bit integer division done in the testbench:
// quo = floor(X*2^53 / D), rem_nz = (X*2^53 mod D) != 0. It also checks that
// done arrives exactly ITER+1 edges after start (one digit per cycle).
module tb_srt_divider;
  localparam int ITER = 28;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [53:0] x = '0;
  logic [52:0] d = '0;
  logic busy, done, rem_nz;
  logic [2*ITER-1:0] quo;
  int checks = 0, failures = 0;

  srt_divider #(.ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [52:0] ma, input logic [52:0] mb);
    logic [127:0] num, exp_q, exp_r;
    int cyc;
    // dividend alignment: x = ma/2 when ma >= mb
    x = (ma >= mb) ? {1'b0, ma} : {ma, 1'b0};
    d = mb;
    num   = 128'(x) << 53;
    exp_q = num / 128'(d);
    exp_r = num % 128'(d);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (quo != exp_q[2*ITER-1:0] || rem_nz != (exp_r != 0) || cyc != ITER + 1) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=%h d=%h quo=%h exp=%h rem_nz=%b cyc=%0d", x, d, quo, exp_q, rem_nz, cyc);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run({1'b1, 52'h0}, {1'b1, 52'h0});
    run({1'b1, 52'hFFFFF_FFFFFFFF}, {1'b1, 52'h0});
    run({1'b1, 52'h0}, {1'b1, 52'hFFFFF_FFFFFFFF});
    run({1'b1, 52'h80000_00000000}, {1'b1, 52'h0});       // 1.5 / 1
    run({1'b1, 52'h0}, {1'b1, 52'h80000_00000000});       // 1 / 1.5
    run({1'b1, 52'h55555_55555555}, {1'b1, 52'hAAAAA_AAAAAAAA});
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        run({1'b1, 3'(i), 49'h0}, {1'b1, 3'(j), 49'h1FFFF_FFFFFFFF});
    for (int i = 0; i < 3000; i++)
      run({1'b1, $urandom(), 20'($urandom())}, {1'b1, $urandom(), 20'($urandom())});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
