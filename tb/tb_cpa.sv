// tb_cpa: checks the 106-bit ripple carry-propagate adder against the
// built-in addition, including the full-length carry ripple (all ones plus
// one) and the carry input and output.
module tb_cpa;
  localparam int W = 106;

  logic [W-1:0] a, b, s;
  logic cin, cout;
  int checks = 0, failures = 0;

  cpa #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W:0] e;
    #1;
    e = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
    checks++;
    if ({cout, s} != e) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b s=%h cout=%b", a, b, cin, s, cout);
    end
  endtask

  initial begin
    a = '1; b = '0; cin = 1'b1; check();
    a = '1; b = '1; cin = 1'b1; check();
    a = '0; b = '0; cin = 1'b0; check();
    for (int i = 0; i < 3000; i++) begin
      a = {$urandom(), $urandom(), $urandom(), $urandom()};
      b = {$urandom(), $urandom(), $urandom(), $urandom()};
      cin = 1'($urandom());
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
