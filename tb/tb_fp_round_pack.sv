// tb_fp_round_pack: checks rounding and packing in all four rounding modes.
//
// Random normalized 56-bit significands (53 bits + guard/round/sticky) with
// exponents across the whole range, including the edges where rounding
// carries into the exponent, overflows or leaves the normal range, are
// compared with the reference rounding of tb_fp_ref_pkg, first for double and
// then for single-precision results.
module tb_fp_round_pack;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

  logic sign_in, zero_in, sp;
  logic signed [12:0] exp_in;
  logic [55:0] sig_in;
  rmode_e rm;
  fp64_t result;
  fexc_t exc;
  int checks = 0, failures = 0;

  fp_round_pack dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    ref_t r;
    logic [127:0] m;
    #1;
    // value = sig[55:0] * 2^(exp - 1023 - 55), sticky folded in by the reference
    m = 128'(sig_in);
    r = ref_round(sign_in, m, int'(exp_in) - 1023 - 55, rm, sp);
    if (zero_in) r = '{res: sp ? {32'h0, sign_in, 31'h0} : {sign_in, 63'h0}, exc: '0};
    checks++;
    if (result != r.res || exc != r.exc) begin
      failures++;
      if (failures < 20)
        $display("FAIL s=%b e=%0d sig=%h rm=%0d res=%h exp=%h exc=%b exp=%b",
                 sign_in, exp_in, sig_in, rm, result, r.res, exc, r.exc);
    end
  endtask

  initial begin
    zero_in = 1'b0;
    sp = 1'b0;
    for (int m = 0; m < 4; m++) begin
      for (int s = 0; s < 2; s++) begin
        rm = rmode_e'(m); sign_in = 1'(s);
        exp_in = 13'sd2046; sig_in = '1; check();           // rounds up into overflow
        exp_in = 13'sd1;    sig_in = {1'b1, 55'h0}; check();
        exp_in = 13'sd0;    sig_in = '1; check();           // rounds up to the normal range
        exp_in = -13'sd5;   sig_in = '1; check();
        exp_in = 13'sd1023; sig_in = {1'b1, 52'h0, 3'b100}; check();   // tie
        exp_in = 13'sd1023; sig_in = {1'b1, 51'h0, 1'b1, 3'b100}; check();
        exp_in = 13'sd2100; sig_in = {1'b1, 55'h0}; check();
      end
    end
    zero_in = 1'b1; sign_in = 1'b1; exp_in = 13'sd5; sig_in = '1; check();
    zero_in = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      rm = rmode_e'($urandom_range(0, 3));
      sign_in = 1'($urandom());
      exp_in = 13'($signed($urandom_range(0, 2100)) - 20);
      sig_in = {1'b1, 23'($urandom()), $urandom()};
      check();
    end
    // single precision: exponent still double-biased, range edges at 897/1150
    sp = 1'b1;
    for (int m = 0; m < 4; m++) begin
      for (int s = 0; s < 2; s++) begin
        rm = rmode_e'(m); sign_in = 1'(s);
        exp_in = 13'sd1150; sig_in = {24'hFF_FFFF, 1'b1, 31'h0}; check();   // overflow
        exp_in = 13'sd1150; sig_in = {24'hFF_FFFF, 32'h0}; check();
        exp_in = 13'sd896;  sig_in = '1; check();
        exp_in = 13'sd897;  sig_in = {1'b1, 55'h0}; check();
        exp_in = 13'sd1023; sig_in = {1'b1, 23'h0, 1'b1, 31'h0}; check();  // tie
        exp_in = 13'sd1023; sig_in = {1'b1, 22'h0, 1'b1, 1'b1, 31'h0}; check();
      end
    end
    zero_in = 1'b1; sign_in = 1'b1; check();
    zero_in = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      rm = rmode_e'($urandom_range(0, 3));
      sign_in = 1'($urandom());
      exp_in = 13'($signed($urandom_range(870, 1180)));
      sig_in = {1'b1, 23'($urandom()), $urandom()};
      if (i % 3 == 0) sig_in[31:0] = {1'b1, 31'h0};
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
