// tb_fp_ref_pkg: reference arithmetic for the floating-point testbenches.
//
// Computes expected results from exact integer arithmetic, independently of
// the RTL: an exact value M * 2^E (M up to 128 bits) is rounded to double or
// single precision by any of the four SPARC rounding modes, with overflow to
// infinity/largest finite and flush-to-zero below the normal range (checked
// after rounding), mirroring the co-processor's documented number handling.
// Also holds helpers to build random operands and to compose SPARC FPop words.
package tb_fp_ref_pkg;
  import fpu_pkg::*;

  typedef struct packed {
    fp64_t res;
    fexc_t exc;
  } ref_t;

  // sp selects single precision: 23-bit fraction, bias 127, result in the
  // low word of res
  function automatic ref_t ref_round(logic sign, logic [127:0] m, int e, rmode_e rm,
                                     bit sp = 1'b0);
    ref_t   r;
    int     p, be, sh, fw, emax;
    logic [127:0] sig, rest;
    logic   g, st, inc;
    r = '0;
    fw   = sp ? 23 : 52;
    emax = sp ? 255 : 2047;
    if (m == 0) begin
      if (sp) r.res[31] = sign;
      else    r.res.sign = sign;
      return r;
    end
    p = 0;
    for (int i = 0; i < 128; i++) if (m[i]) p = i;
    be = p + e + (sp ? 127 : 1023);
    if (p >= fw) begin
      sh   = p - fw;
      sig  = m >> sh;
      g    = (sh > 0) ? m[sh-1] : 1'b0;
      rest = (sh > 1) ? (m & ((128'd1 << (sh - 1)) - 1)) : '0;
      st   = rest != 0;
    end else begin
      sig = m << (fw - p);
      g   = 1'b0;
      st  = 1'b0;
    end
    case (rm)
      RM_NEAREST: inc = g && (st || sig[0]);
      RM_ZERO:    inc = 1'b0;
      RM_POS_INF: inc = !sign && (g || st);
      default:    inc = sign && (g || st);
    endcase
    sig = sig + 128'(inc);
    if (sig[fw+1]) begin
      sig = sig >> 1;
      be  = be + 1;
    end
    r.exc.nx = g || st;
    if (be >= emax) begin
      r.exc.of = 1'b1;
      r.exc.nx = 1'b1;
      if (rm == RM_NEAREST || (rm == RM_POS_INF && !sign) || (rm == RM_NEG_INF && sign))
        r.res = sp ? {32'h0, sign, 31'h7F80_0000} : '{sign: sign, expo: '1, mant: '0};
      else
        r.res = sp ? {32'h0, sign, 31'h7F7F_FFFF} : '{sign: sign, expo: 11'h7FE, mant: '1};
    end else if (be <= 0) begin
      r.exc.uf = 1'b1;
      r.exc.nx = 1'b1;
      r.res    = sp ? {32'h0, sign, 31'h0} : '{sign: sign, expo: '0, mant: '0};
    end else begin
      r.res = sp ? {32'h0, sign, 8'(be), sig[22:0]} : '{sign: sign, expo: 11'(be), mant: sig[51:0]};
    end
    return r;
  endfunction

  function automatic logic [127:0] sig_of(fp64_t a);
    return (a.expo == 0) ? '0 : {75'd0, 1'b1, a.mant};
  endfunction

  // exact product, rounded
  function automatic ref_t ref_mul(fp64_t a, fp64_t b, rmode_e rm, bit sp = 1'b0);
    return ref_round(a.sign ^ b.sign, sig_of(a) * sig_of(b),
                     int'(a.expo) + int'(b.expo) - 2 * 1075, rm, sp);
  endfunction

  // quotient with 70 extra bits and a sticky bit, rounded
  function automatic ref_t ref_div(fp64_t a, fp64_t b, rmode_e rm, bit sp = 1'b0);
    logic [127:0] num, q, rm_;
    num = sig_of(a) << 70;
    q   = num / sig_of(b);
    rm_ = num % sig_of(b);
    return ref_round(a.sign ^ b.sign, (q << 1) | 128'(rm_ != 0),
                     int'(a.expo) - int'(b.expo) - 71, rm, sp);
  endfunction

  // sum of finite non-zero operands; a far smaller operand is kept as a sticky
  function automatic ref_t ref_add(fp64_t a, fp64_t b, logic sub, rmode_e rm,
                                   bit sp = 1'b0);
    logic         sb, sx, sy;
    fp64_t        x, y;
    int           d;
    logic [127:0] mx, my, m;
    ref_t         r;
    sb = b.sign ^ sub;
    if ({a.expo, a.mant} >= {b.expo, b.mant}) begin
      x = a; y = b; sx = a.sign; sy = sb;
    end else begin
      x = b; y = a; sx = sb; sy = a.sign;
    end
    d  = int'(x.expo) - int'(y.expo);
    mx = sig_of(x) << 62;
    if (y.expo == 0)  my = '0;
    else if (d > 60)  my = 128'd1;
    else              my = sig_of(y) << (62 - d);
    m = (sx == sy) ? mx + my : mx - my;
    if (m == 0) begin
      r = '0;
      if (sp) r.res[31]  = (sx == sy) ? sx : (rm == RM_NEG_INF);
      else    r.res.sign = (sx == sy) ? sx : (rm == RM_NEG_INF);
      return r;
    end
    return ref_round(sx, m, int'(x.expo) - 1075 - 62, rm, sp);
  endfunction

  // compare of ordered operands, zeros of either sign equal
  function automatic logic [1:0] ref_cmp(fp64_t x, fp64_t y);
    real rx, ry;
    rx = (x.expo == 0) ? 0.0 : $bitstoreal(x);
    ry = (y.expo == 0) ? 0.0 : $bitstoreal(y);
    if (rx == ry) return FCC_EQ;
    if (rx < ry)  return FCC_LT;
    return FCC_GT;
  endfunction

  // double to 32-bit integer, toward zero, SPARC out-of-range results
  function automatic ref_t ref_dtoi(fp64_t y);
    ref_t r;
    real  rv;
    r  = '0;
    rv = (y.expo == 0) ? 0.0 : $bitstoreal(y);
    if (fp_is_nan(y) || rv >= 2147483648.0 || rv <= -2147483649.0) begin
      r.exc.nv = 1'b1;
      r.res = (y.sign && !fp_is_nan(y)) ? 64'h8000_0000 : 64'h7FFF_FFFF;
    end else begin
      r.res = {32'h0, 32'($rtoi(rv))};
      r.exc.nx = ($itor($rtoi(rv)) != rv);
    end
    return r;
  endfunction

  // random single in the low word, biased exponent in [emin, emax]
  function automatic fp64_t rand_sp(int emin, int emax);
    return {32'h0, 1'($urandom()), 8'(emin + int'($urandom_range(0, emax - emin))),
            23'($urandom())};
  endfunction

  function automatic fp64_t rand_fp(int emin, int emax);
    fp64_t f;
    f.sign = 1'($urandom());
    f.expo = 11'(emin + int'($urandom_range(0, emax - emin)));
    f.mant = {20'($urandom()), $urandom()};
    return f;
  endfunction

  function automatic logic [31:0] fpop(logic [8:0] opf, logic [4:0] rd, logic fpop2);
    return {2'b10, rd, fpop2 ? OP3_FPOP2 : OP3_FPOP1, 5'd1, opf, 5'd2};
  endfunction

endpackage
