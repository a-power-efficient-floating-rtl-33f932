// fp_divider: the floating-point divider execution pipeline (FDIVs, FDIVd).
//
// Single-precision operands (src_sp, low word of a and b) are widened exactly
// to double format on entry and divided with the full 54-bit quotient; dst_sp
// makes the last stage round to single and pack into the low word. The
// remainder flag keeps the sticky bit exact, so single results are correctly
// rounded from the double-width quotient.
//
// Four stages, as the design divides the operation:
//   1. initialize: unpack, sign (xor), exponent ea - eb + bias, special
//      operands (NaN, infinity, zero, division by zero) and dividend
//      alignment: when the dividend significand is not below the divisor's it
//      is shifted right by one and the exponent raised by one, so the
//      significand quotient falls in [1/2, 1) and never overflows.
//   2. SRT: the radix-4 SRT divider (srt_divider) produces two quotient bits
//      per cycle for SRT_ITER (28) cycles, giving 54 quotient bits and an exact
//      remainder-nonzero flag.
//   3. adjust: the quotient is read as a [1,2) significand with the exponent
//      lowered by one, guard bit from the last quotient bit, sticky from the
//      remainder.
//   4. round and pack (fp_round_pack).
// Interface: an op (with src_sp, dst_sp, rm, tag, a, b) is accepted when
// in_valid and in_ready are high at a rising edge of clk; in_ready is low from acceptance until the SRT stage has
// finished, so the divider takes a new op about every SRT_ITER+2 cycles (the
// SRT stage is iterative, not unrolled). The result appears exactly LAT_DIV
// (SRT_ITER+4) cycles after acceptance with out_valid high for one cycle.
// busy is high while any stage holds an op. The iterative SRT stage and the
// cycle counts are this design's choices.
module fp_divider
  import fpu_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic             src_sp,
  input  logic             dst_sp,
  input  rmode_e           rm,
  input  logic [TAG_W-1:0] tag,
  input  fp64_t            a,
  input  fp64_t            b,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output fp64_t            out_result,
  output fexc_t            out_exc,
  output logic             busy
);

  // ------------------------------------------------------------------ stage 1
  typedef struct packed {
    logic              sign;
    logic signed [12:0] exp;
    logic [53:0]       x;
    logic [52:0]       d;
    logic              special;
    fp64_t             spec_res;
    fexc_t             spec_exc;
    logic              sp;
    rmode_e            rm;
    logic [TAG_W-1:0]  tag;
  } s1_t;

  s1_t  s1_d, s1_q;
  logic s1_v;
  logic align;
  fp64_t au, bu;                  // operands in double format

  assign au = src_sp ? sgl_to_dbl(a[31:0]) : a;
  assign bu = src_sp ? sgl_to_dbl(b[31:0]) : b;

  always_comb begin
    s1_d      = '0;
    s1_d.rm   = rm;
    s1_d.tag  = tag;
    s1_d.sp   = dst_sp;
    s1_d.sign = au.sign ^ bu.sign;
    align     = au.mant >= bu.mant;
    s1_d.x    = align ? {2'b01, au.mant} : {1'b1, au.mant, 1'b0};
    s1_d.d    = {1'b1, bu.mant};
    // quotient significand is 2*(x/d) in [1,2): exponent lowered by one
    s1_d.exp  = $signed(13'(au.expo)) - $signed(13'(bu.expo)) + 13'sd1022 + 13'(align);
    if (fp_is_nan(au) || fp_is_nan(bu)) begin
      s1_d.special     = 1'b1;
      s1_d.spec_res    = fp_nan_prop(au, bu);
      s1_d.spec_exc.nv = fp_is_snan(au) || fp_is_snan(bu);
    end else if ((fp_is_inf(au) && fp_is_inf(bu)) || (fp_is_zero(au) && fp_is_zero(bu))) begin
      s1_d.special     = 1'b1;
      s1_d.spec_res    = QNAN_DEFAULT;
      s1_d.spec_exc.nv = 1'b1;
    end else if (fp_is_inf(au)) begin
      s1_d.special  = 1'b1;
      s1_d.spec_res = '{sign: s1_d.sign, expo: '1, mant: '0};
    end else if (fp_is_zero(bu)) begin
      s1_d.special     = 1'b1;
      s1_d.spec_res    = '{sign: s1_d.sign, expo: '1, mant: '0};
      s1_d.spec_exc.dz = 1'b1;
    end else if (fp_is_zero(au) || fp_is_inf(bu)) begin
      s1_d.special  = 1'b1;
      s1_d.spec_res = '{sign: s1_d.sign, expo: '0, mant: '0};
    end
    if (dst_sp) s1_d.spec_res = special_to_sgl(s1_d.spec_res);
  end

  // ------------------------------------------------------------------ stage 2
  logic              srt_busy, srt_done, srt_rem_nz;
  logic [2*SRT_ITER-1:0] srt_quo;

  srt_divider #(.ITER(SRT_ITER)) u_srt (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (s1_v),
    .x      (s1_q.x),
    .d      (s1_q.d),
    .busy   (srt_busy),
    .done   (srt_done),
    .quo    (srt_quo),
    .rem_nz (srt_rem_nz)
  );

  // ------------------------------------------------------------------ stage 3
  typedef struct packed {
    logic              sign;
    logic signed [12:0] exp;
    logic [55:0]       sig;
    logic              special;
    fp64_t             spec_res;
    fexc_t             spec_exc;
    logic              sp;
    rmode_e            rm;
    logic [TAG_W-1:0]  tag;
  } s3_t;

  s3_t  s3_d, s3_q;
  logic s3_v;

  always_comb begin
    s3_d          = '0;
    s3_d.sign     = s1_q.sign;
    s3_d.exp      = s1_q.exp;
    // 53-bit significand = quo[53:1], guard = quo[0], sticky = remainder
    s3_d.sig      = {srt_quo[53:0], 1'b0, srt_rem_nz};
    s3_d.special  = s1_q.special;
    s3_d.spec_res = s1_q.spec_res;
    s3_d.spec_exc = s1_q.spec_exc;
    s3_d.sp       = s1_q.sp;
    s3_d.rm       = s1_q.rm;
    s3_d.tag      = s1_q.tag;
  end

  // ------------------------------------------------------------------ stage 4
  fp64_t rnd_res;
  fexc_t rnd_exc;

  fp_round_pack u_round (
    .sign_in (s3_q.sign),
    .exp_in  (s3_q.exp),
    .sig_in  (s3_q.sig),
    .zero_in (1'b0),
    .sp      (s3_q.sp),
    .rm      (s3_q.rm),
    .result  (rnd_res),
    .exc     (rnd_exc)
  );

  // ------------------------------------------------------------- registers
  assign in_ready = !s1_v && !srt_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v      <= 1'b0;
      s3_v      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_v      <= in_valid && in_ready;
      s3_v      <= srt_done;
      out_valid <= s3_v;
    end
  end

  // s1_q is held through the SRT stage: no new op is accepted meanwhile
  always_ff @(posedge clk) begin
    if (in_valid && in_ready) s1_q <= s1_d;
    if (srt_done)             s3_q <= s3_d;
    if (s3_v) begin
      out_tag    <= s3_q.tag;
      out_result <= s3_q.special ? s3_q.spec_res : rnd_res;
      out_exc    <= s3_q.special ? s3_q.spec_exc : rnd_exc;
    end
  end

  assign busy = s1_v | srt_busy | srt_done | s3_v | out_valid;

endmodule
