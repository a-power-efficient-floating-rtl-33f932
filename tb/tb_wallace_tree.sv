// tb_wallace_tree: checks the carry-save reduction tree.
//
// Feeds 28 random rows of 106 bits (the multiplier's configuration) and checks
// that sum + carry equals the arithmetic sum of all rows modulo 2^106; also
// all-ones rows, which give the longest carry chains.
module tb_wallace_tree;
  localparam int N = 28;
  localparam int W = 106;

  logic [N-1:0][W-1:0] rows;
  logic [W-1:0] sum, carry;
  int checks = 0, failures = 0;

  wallace_tree #(.N(N), .W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-1:0] s;
    #1;
    s = '0;
    for (int i = 0; i < N; i++) s = s + rows[i];
    checks++;
    if (sum + carry != s) begin
      failures++;
      $display("FAIL sum=%h carry=%h exp=%h", sum, carry, s);
    end
  endtask

  initial begin
    rows = '1; check();
    rows = '0; check();
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N; i++)
        rows[i] = {$urandom(), $urandom(), $urandom(), $urandom()};
      if (t % 7 == 0) rows[t % N] = '1;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
