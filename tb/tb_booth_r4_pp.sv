// tb_booth_r4_pp: checks the radix-4 Booth partial products.
//
// For random and corner-case 53-bit operands, the ND+1 rows must add up
// (modulo 2^106) to the exact product a*b, there must be ND = 27 digit rows
// (about n/2 summands), and each digit row must be 0, +-a or +-2a shifted by
// 2i, matching the digit recoded from the multiplier bits by the testbench.
module tb_booth_r4_pp;
  localparam int W = 53;
  localparam int ND = 27;
  localparam int PW = 106;

  logic [W-1:0] a, b;
  logic [ND:0][PW-1:0] pp;
  int checks = 0, failures = 0;

  booth_r4_pp #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [PW-1:0] s, row;
    logic [W+1:0]  bx;
    int            dg;
    #1;
    s = '0;
    for (int i = 0; i <= ND; i++) s = s + pp[i];
    checks++;
    if (s != PW'(a) * PW'(b)) begin
      failures++;
      $display("FAIL a=%h b=%h sum=%h", a, b, s);
    end
    bx = {1'b0, b, 1'b0};
    for (int i = 0; i < ND; i++) begin
      dg = -2 * int'(bx[2*i+2]) + int'(bx[2*i+1]) + int'(bx[2*i]);
      row = (PW'($signed(dg)) * PW'(a)) << (2 * i);
      checks++;
      if (pp[i] + (PW'(pp[ND][2*i]) << (2 * i)) != row) begin
        failures++;
        $display("FAIL row %0d digit %0d", i, dg);
      end
    end
  endtask

  initial begin
    a = '1; b = '1; check();
    a = '0; b = '1; check();
    a = '1; b = {W{1'b0}} | 53'h0A_AAAA_AAAA_AAAA; check();
    for (int i = 0; i < 2000; i++) begin
      a = {$urandom(), $urandom()};
      b = {$urandom(), $urandom()};
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
