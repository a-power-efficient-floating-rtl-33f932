// tb_fp_divider: self-checking test of the divider pipeline.
//
// Issues divides as fast as in_ready allows and checks each quotient against
// the exact integer quotient rounded by tb_fp_ref_pkg: random operands in all
// four rounding modes, dividend alignment both ways, overflow, underflow,
// division by zero and other special operands, for FDIVd and FDIVs. Each result must arrive
// exactly LAT_DIV cycles after issue, and in_ready must fall for the SRT stage
// (the divider is not pipelined through its SRT iterations).
module tb_fp_divider;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic src_sp = 1'b0, dst_sp = 1'b0;
  rmode_e rm = RM_NEAREST;
  logic [TAG_W-1:0] tag = '0;
  fp64_t a = '0, b = '0;
  logic out_valid, busy;
  logic [TAG_W-1:0] out_tag;
  fp64_t out_result;
  fexc_t out_exc;
  int checks = 0, failures = 0, cycle = 0, stall_cycles = 0;

  typedef struct packed {
    fp64_t res; fexc_t exc; logic [TAG_W-1:0] tag; int issued;
  } exp_t;
  exp_t q[$];

  fp_divider dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL unexpected result");
    end else begin
      e = q.pop_front();
      if (out_tag != e.tag || out_exc != e.exc || out_result != e.res || cycle - e.issued != LAT_DIV) begin
        failures++;
        if (failures < 20)
          $display("FAIL res=%h exp=%h exc=%b exp=%b lat=%0d", out_result, e.res, out_exc, e.exc, cycle - e.issued);
      end
    end
  end

  task automatic issue(rmode_e m, fp64_t x, fp64_t y, fp64_t res, fexc_t exc,
                        logic sp = 1'b0);
    exp_t e;
    @(posedge clk);
    #1;
    in_valid = 1'b1; rm = m; a = x; b = y; tag = 5'($urandom());
    src_sp = sp; dst_sp = sp;
    while (!in_ready) begin
      stall_cycles++;
      @(posedge clk);
      #1;
    end
    e.res = res; e.exc = exc; e.tag = tag; e.issued = cycle;
    q.push_back(e);
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  task automatic div_case(rmode_e m, fp64_t x, fp64_t y);
    ref_t r;
    r = ref_div(x, y, m);
    issue(m, x, y, r.res, r.exc);
  endtask

  // FDIVs of singles in the low word
  task automatic div_case_sp(rmode_e m, fp64_t x, fp64_t y);
    ref_t r;
    r = ref_div(sgl_to_dbl(x[31:0]), sgl_to_dbl(y[31:0]), m, 1'b1);
    issue(m, x, y, r.res, r.exc, 1'b1);
  endtask

  localparam fp64_t PINF = 64'h7FF0_0000_0000_0000;
  localparam fp64_t ONE  = 64'h3FF0_0000_0000_0000;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    div_case(RM_NEAREST, $realtobits(468.0), $realtobits(2.0));
    for (int m = 0; m < 4; m++) begin
      div_case(rmode_e'(m), ONE, $realtobits(3.0));
      div_case(rmode_e'(m), $realtobits(-2.0), $realtobits(3.0));
      div_case(rmode_e'(m), 64'h7FE0_0000_0000_0000, 64'h3FE0_0000_0000_0000);   // overflow
      div_case(rmode_e'(m), 64'h0010_0000_0000_0000, 64'h4000_0000_0000_0000);   // underflow
    end
    issue(RM_NEAREST, ONE, 64'h8000_0000_0000_0000, 64'hFFF0_0000_0000_0000, 5'b00010);
    issue(RM_NEAREST, 64'h0, 64'h0, QNAN_DEFAULT, 5'b10000);
    issue(RM_NEAREST, PINF, PINF, QNAN_DEFAULT, 5'b10000);
    issue(RM_NEAREST, ONE, PINF, 64'h0, 5'b00000);
    issue(RM_NEAREST, PINF, ONE, PINF, 5'b00000);
    issue(RM_NEAREST, 64'h7FF4_0000_0000_0000, ONE, 64'h7FFC_0000_0000_0000, 5'b10000);
    for (int i = 0; i < 1500; i++)
      div_case(rmode_e'($urandom_range(0, 3)), rand_fp(1, 2046), rand_fp(1, 2046));
    for (int i = 0; i < 1500; i++)
      div_case(rmode_e'($urandom_range(0, 3)), rand_fp(900, 1150), rand_fp(900, 1150));
    // single precision: FDIVs
    div_case_sp(RM_NEAREST, 64'h43EA_0000, 64'h4000_0000);
    for (int m = 0; m < 4; m++) begin
      div_case_sp(rmode_e'(m), 64'h3F80_0000, 64'h4040_0000);
      div_case_sp(rmode_e'(m), 64'h7F00_0000, 64'h3F00_0000);            // overflow
      div_case_sp(rmode_e'(m), 64'h0080_0000, 64'h4000_0000);            // underflow
    end
    issue(RM_NEAREST, 64'h3F80_0000, 64'h8000_0000, 64'hFF80_0000, 5'b00010, 1'b1);
    issue(RM_NEAREST, 64'h0, 64'h0, 64'h7FFF_FFFF, 5'b10000, 1'b1);
    for (int i = 0; i < 1000; i++)
      div_case_sp(rmode_e'($urandom_range(0, 3)), rand_sp(1, 254), rand_sp(1, 254));
    for (int i = 0; i < 500; i++)
      div_case_sp(rmode_e'($urandom_range(0, 3)), rand_sp(100, 160), rand_sp(100, 160));
    repeat (LAT_DIV + 5) @(posedge clk);
    checks++;
    if (q.size() != 0 || stall_cycles == 0) begin
      failures++;
      $display("FAIL missing=%0d stall_cycles=%0d", q.size(), stall_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
