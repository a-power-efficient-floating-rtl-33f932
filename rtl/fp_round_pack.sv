// fp_round_pack: rounding and packing stage shared by the three execution pipelines.
//
// Input is a normalized result: sig[55] is the leading one, the bits below it
// the fraction, then guard and sticky bits, with a signed exponent exp_in
// biased as for a double (1023), for the value 1.sig * 2^(exp_in-1023).
// sp selects the result precision: a double keeps 53 significant bits
// (guard = sig[2]), a single 24 bits (guard = sig[31]); every lower bit is
// folded into the sticky. The significand is rounded by the SPARC rounding
// mode (nearest-even, toward zero, toward +inf, toward -inf); a carry out of
// rounding bumps the exponent. Exponents above the format's range after
// rounding overflow to infinity or to the largest finite number as the
// rounding mode requires. Results below the normal range are flushed to a
// signed zero with the underflow and inexact flags set, as SPARC's
// non-standard (FSR.NS) mode does; gradual underflow is not built. zero_in
// forces an exact signed zero. A single result is packed into result[31:0]
// with the upper word zero. Purely combinational; the pipeline that uses it
// registers the output.
module fp_round_pack
  import fpu_pkg::*;
(
  input  logic              sign_in,
  input  logic signed [12:0] exp_in,
  input  logic [55:0]       sig_in,
  input  logic              zero_in,
  input  logic              sp,
  input  rmode_e            rm,
  output fp64_t             result,
  output fexc_t             exc
);

  logic              lsb, guard, rest, inexact, inc, carry, to_inf;
  logic [53:0]       sum_d;
  logic [24:0]       sum_s;
  logic signed [13:0] exp_r, emax;

  always_comb begin
    if (sp) begin
      lsb   = sig_in[32];
      guard = sig_in[31];
      rest  = |sig_in[30:0];
    end else begin
      lsb   = sig_in[3];
      guard = sig_in[2];
      rest  = |sig_in[1:0];
    end
    inexact = guard | rest;
    unique case (rm)
      RM_NEAREST: inc = guard & (rest | lsb);
      RM_ZERO:    inc = 1'b0;
      RM_POS_INF: inc = ~sign_in & inexact;
      RM_NEG_INF: inc =  sign_in & inexact;
      default:    inc = 1'b0;
    endcase
    sum_d = {1'b0, sig_in[55:3]} + 54'(inc);
    sum_s = {1'b0, sig_in[55:32]} + 25'(inc);
    carry = sp ? sum_s[24] : sum_d[53];
    // exponent rebiased to the result format
    exp_r = 14'(exp_in) + 14'(carry) - (sp ? 14'sd896 : 14'sd0);
    emax  = sp ? 14'sd255 : 14'sd2047;
    to_inf = (rm == RM_NEAREST) || (rm == RM_POS_INF && !sign_in) || (rm == RM_NEG_INF && sign_in);

    if (sp)
      result = {32'h0, sign_in, 8'(exp_r), carry ? sum_s[23:1] : sum_s[22:0]};
    else
      result = '{sign: sign_in, expo: 11'(exp_r), mant: carry ? sum_d[52:1] : sum_d[51:0]};
    exc = '{nv: 1'b0, of: 1'b0, uf: 1'b0, dz: 1'b0, nx: inexact};

    if (zero_in) begin
      result = sp ? {32'h0, sign_in, 31'h0} : {sign_in, 63'h0};
      exc    = '0;
    end else if (exp_r >= emax) begin
      // round-to-nearest and rounding away from zero go to infinity,
      // rounding toward zero stays at the largest finite number
      exc = '{nv: 1'b0, of: 1'b1, uf: 1'b0, dz: 1'b0, nx: 1'b1};
      if (sp) result = {32'h0, sign_in, to_inf ? 31'h7F80_0000 : 31'h7F7F_FFFF};
      else    result = {sign_in, to_inf ? 63'h7FF0_0000_0000_0000 : 63'h7FEF_FFFF_FFFF_FFFF};
    end else if (exp_r <= 14'sd0) begin
      exc    = '{nv: 1'b0, of: 1'b0, uf: 1'b1, dz: 1'b0, nx: 1'b1};
      result = sp ? {32'h0, sign_in, 31'h0} : {sign_in, 63'h0};
    end
  end

endmodule
