// fp_adder: the floating-point adder execution pipeline.
//
// Executes add and subtract (FADDs/d, FSUBs/d), compare (FCMPs/d, FCMPEs/d),
// the conversions between 32-bit integers and floats (FiTOs/d, FsTOi, FdTOi)
// and between the precisions (FsTOd, FdTOs), and the single-register moves
// FMOVs, FNEGs, FABSs. Single-precision operands (src_sp, in the low word of
// a and b) are widened exactly to double format on entry, so one double
// datapath serves both precisions; dst_sp makes the last stage round to
// single precision and pack the result into the low word. Rounding once from
// the exact sum makes the single results correctly rounded.
// Three stages, each ending in a pipeline register clocked by the pipeline's
// own (gated) clock:
//   1. unpack: effective operation, magnitude compare and swap so that x holds
//      the larger operand, alignment of the smaller significand by a right shift
//      with a sticky bit; special operands (NaN, infinity), compare, moves and
//      float-to-integer conversion are resolved here and bypass the arithmetic.
//   2. add/subtract the aligned 56-bit significands (53 bits + guard, round,
//      sticky), then normalize: a carry-out shifts right by one, otherwise a
//      leading-zero count drives a left shift. FiTOs/FiTOd enter this stage
//      as an unnormalized significand and are normalized by the same logic.
//   3. round and pack (fp_round_pack) into the output register.
// Interface: in_valid/op/src_sp/dst_sp/rm/tag/a/b are sampled at a rising
// edge of clk; the result appears LAT_ADD (3) cycles later with out_valid high
// for one cycle. Float-to-integer ops return the integer in out_result[31:0],
// rounded toward zero as SPARC defines; compares return out_fcc with
// out_fcc_valid. The pipeline accepts a new op every cycle. busy is high while any stage holds an op, so the clock
// gate keeps the clock running until the pipeline has drained.
// The three-stage split, the operand conventions (conversions read b, as
// SPARC reads rs2) and the NaN rules are this design's choices.
module fp_adder
  import fpu_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fpop_e            op,
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
  output logic [1:0]       out_fcc,
  output logic             out_fcc_valid,
  output logic             busy
);

  // ------------------------------------------------------------------ stage 1
  typedef struct packed {
    logic              sign;      // sign of the result when not zero
    logic              sub;       // effective subtraction
    logic signed [12:0] exp;      // biased exponent of bit 55 of x
    logic [55:0]       x;         // larger significand
    logic [55:0]       y;         // aligned smaller significand
    logic              special;   // result fully known: spec_res/spec_exc
    fp64_t             spec_res;
    fexc_t             spec_exc;
    logic              fcc_valid;
    logic [1:0]        fcc;
    logic              sp;        // round to single precision
    rmode_e            rm;
    logic [TAG_W-1:0]  tag;
  } s1_t;

  s1_t  s1_d, s1_q;
  logic s1_v;

  fp64_t       au, bu;            // operands in double format
  logic [62:0] mag_a, mag_b;
  logic        b_sign_eff, a_ge_b;
  fp64_t       xo, yo;
  logic [10:0] dexp;
  logic [55:0] ysig, yshift;
  logic        ysticky;
  logic signed [63:0] key_a, key_b;
  logic signed [12:0] e_unb;
  logic [52:0] ti_sig;
  logic [31:0] ti_mag;
  logic [31:0] ti_int;
  logic [31:0] it_mag;

  always_comb begin
    s1_d     = '0;
    s1_d.rm  = rm;
    s1_d.tag = tag;
    s1_d.sp  = dst_sp;

    au = src_sp ? sgl_to_dbl(a[31:0]) : a;
    bu = src_sp ? sgl_to_dbl(b[31:0]) : b;

    mag_a      = fp_is_zero(au) ? '0 : {au.expo, au.mant};
    mag_b      = fp_is_zero(bu) ? '0 : {bu.expo, bu.mant};
    b_sign_eff = bu.sign ^ (op == OP_SUB);
    a_ge_b     = mag_a >= mag_b;
    xo         = a_ge_b ? au : bu;
    yo         = a_ge_b ? bu : au;
    dexp       = a_ge_b ? au.expo - bu.expo : bu.expo - au.expo;

    // alignment shift of the smaller significand, shifted-out bits -> sticky
    ysig = {fp_sig(yo), 3'b000};
    if (dexp >= 11'd56) begin
      yshift  = '0;
      ysticky = |ysig;
    end else begin
      yshift  = ysig >> dexp;
      ysticky = |(ysig & ~({56{1'b1}} << dexp));
    end

    s1_d.sign = a_ge_b ? au.sign : b_sign_eff;
    s1_d.sub  = au.sign ^ b_sign_eff;
    s1_d.exp  = 13'(xo.expo);
    s1_d.x    = {fp_sig(xo), 3'b000};
    s1_d.y    = {yshift[55:1], yshift[0] | ysticky};

    // ordering keys for compare: sign-magnitude to two's complement
    key_a  = au.sign ? -$signed({1'b0, mag_a}) : $signed({1'b0, mag_a});
    key_b  = bu.sign ? -$signed({1'b0, mag_b}) : $signed({1'b0, mag_b});

    // float to integer helpers: truncation toward zero
    e_unb  = $signed(13'(bu.expo)) - 13'sd1023;
    ti_sig = {1'b1, bu.mant};
    ti_mag = '0;
    ti_int = '0;
    if (e_unb >= 0 && e_unb <= 30) begin
      ti_mag = 32'(ti_sig >> (6'd52 - 6'(e_unb)));
      ti_int = bu.sign ? -ti_mag : ti_mag;
    end

    // integer to float helper: magnitude of the integer in b[31:0]
    it_mag = b[31] ? -b[31:0] : b[31:0];

    unique case (op)
      OP_ADD, OP_SUB: begin
        if (fp_is_nan(au) || fp_is_nan(bu)) begin
          s1_d.special     = 1'b1;
          s1_d.spec_res    = fp_nan_prop(au, bu);
          s1_d.spec_exc.nv = fp_is_snan(au) || fp_is_snan(bu);
        end else if (fp_is_inf(au) && fp_is_inf(bu) && s1_d.sub) begin
          s1_d.special     = 1'b1;
          s1_d.spec_res    = QNAN_DEFAULT;
          s1_d.spec_exc.nv = 1'b1;
        end else if (fp_is_inf(au) || fp_is_inf(bu)) begin
          s1_d.special  = 1'b1;
          s1_d.spec_res = '{sign: fp_is_inf(au) ? au.sign : b_sign_eff, expo: '1, mant: '0};
        end
      end
      OP_CVT: begin
        // precision conversion: b passes the add path with nothing added
        s1_d.sign = bu.sign;
        s1_d.sub  = 1'b0;
        s1_d.exp  = 13'(bu.expo);
        s1_d.x    = {fp_sig(bu), 3'b000};
        s1_d.y    = '0;
        if (fp_is_nan(bu)) begin
          s1_d.special     = 1'b1;
          s1_d.spec_res    = fp_nan_prop(bu, bu);
          s1_d.spec_exc.nv = fp_is_snan(bu);
        end else if (fp_is_inf(bu)) begin
          s1_d.special  = 1'b1;
          s1_d.spec_res = bu;
        end
      end
      OP_CMP, OP_CMPE: begin
        s1_d.special   = 1'b1;
        s1_d.fcc_valid = 1'b1;
        if (fp_is_nan(au) || fp_is_nan(bu)) begin
          s1_d.fcc         = FCC_UN;
          s1_d.spec_exc.nv = (op == OP_CMPE) || fp_is_snan(au) || fp_is_snan(bu);
        end else if (key_a == key_b) s1_d.fcc = FCC_EQ;
        else if (key_a < key_b)      s1_d.fcc = FCC_LT;
        else                         s1_d.fcc = FCC_GT;
      end
      OP_FTOI: begin
        s1_d.special = 1'b1;
        if (fp_is_nan(bu)) begin
          s1_d.spec_res    = 64'h0000_0000_7FFF_FFFF;
          s1_d.spec_exc.nv = 1'b1;
        end else if (fp_is_zero(bu)) begin
          s1_d.spec_res = '0;
        end else if (e_unb < 0) begin
          s1_d.spec_res    = '0;
          s1_d.spec_exc.nx = 1'b1;
        end else if (e_unb > 30) begin
          if (bu.sign && e_unb == 31 && bu.mant == '0) begin
            s1_d.spec_res = 64'h0000_0000_8000_0000;
          end else begin
            s1_d.spec_res    = bu.sign ? 64'h0000_0000_8000_0000 : 64'h0000_0000_7FFF_FFFF;
            s1_d.spec_exc.nv = 1'b1;
          end
        end else begin
          s1_d.spec_res    = {32'h0, ti_int};
          s1_d.spec_exc.nx = |(ti_sig & ~({53{1'b1}} << (6'd52 - 6'(e_unb))));
        end
      end
      OP_ITOF: begin
        // the integer magnitude is placed so that bit 55 weighs 2^31
        s1_d.sign = b[31];
        s1_d.sub  = 1'b0;
        s1_d.exp  = 13'sd1023 + 13'sd31;
        s1_d.x    = {it_mag, 24'h0};
        s1_d.y    = '0;
      end
      OP_MOV, OP_NEG, OP_ABS: begin
        // single-register moves: only the sign bit changes, no exceptions
        s1_d.special  = 1'b1;
        s1_d.spec_res = {32'h0, (op == OP_MOV) ? b[31] : (op == OP_NEG) ? !b[31] : 1'b0, b[30:0]};
      end
      default: ;
    endcase

    // special floating-point results of single-precision ops
    if (dst_sp && (op == OP_ADD || op == OP_SUB || op == OP_CVT))
      s1_d.spec_res = special_to_sgl(s1_d.spec_res);
  end

  // ------------------------------------------------------------------ stage 2
  typedef struct packed {
    logic              sign;
    logic              zero;
    logic signed [12:0] exp;
    logic [55:0]       sig;
    logic              special;
    fp64_t             spec_res;
    fexc_t             spec_exc;
    logic              fcc_valid;
    logic [1:0]        fcc;
    logic              sp;
    rmode_e            rm;
    logic [TAG_W-1:0]  tag;
  } s2_t;

  s2_t  s2_d, s2_q;
  logic s2_v;

  logic [56:0] sum;
  logic [5:0]  lz;

  function automatic logic [5:0] lzc56(logic [55:0] v);
    logic [5:0] n;
    n = 6'd56;
    for (int i = 0; i < 56; i++)
      if (v[i]) n = 6'(55 - i);
    return n;
  endfunction

  always_comb begin
    s2_d           = '0;
    s2_d.special   = s1_q.special;
    s2_d.spec_res  = s1_q.spec_res;
    s2_d.spec_exc  = s1_q.spec_exc;
    s2_d.fcc_valid = s1_q.fcc_valid;
    s2_d.fcc       = s1_q.fcc;
    s2_d.rm        = s1_q.rm;
    s2_d.sp        = s1_q.sp;
    s2_d.tag       = s1_q.tag;

    sum = s1_q.sub ? {1'b0, s1_q.x} - {1'b0, s1_q.y} : {1'b0, s1_q.x} + {1'b0, s1_q.y};
    lz  = lzc56(sum[55:0]);

    s2_d.sign = s1_q.sign;
    if (sum == '0) begin
      s2_d.zero = 1'b1;
      // exact zero: x + (-x) is +0 except when rounding toward -inf
      s2_d.sign = s1_q.sub ? (s1_q.rm == RM_NEG_INF) : s1_q.sign;
      s2_d.exp  = '0;
      s2_d.sig  = '0;
    end else if (sum[56]) begin
      s2_d.exp = s1_q.exp + 13'sd1;
      s2_d.sig = {sum[56:2], |sum[1:0]};
    end else begin
      s2_d.exp = s1_q.exp - 13'(lz);
      s2_d.sig = sum[55:0] << lz;
    end
  end

  // ------------------------------------------------------------------ stage 3
  fp64_t rnd_res;
  fexc_t rnd_exc;

  fp_round_pack u_round (
    .sign_in (s2_q.sign),
    .exp_in  (s2_q.exp),
    .sig_in  (s2_q.sig),
    .zero_in (s2_q.zero),
    .sp      (s2_q.sp),
    .rm      (s2_q.rm),
    .result  (rnd_res),
    .exc     (rnd_exc)
  );

  // ------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v      <= 1'b0;
      s2_v      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_v      <= in_valid;
      s2_v      <= s1_v;
      out_valid <= s2_v;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) s1_q <= s1_d;
    if (s1_v)     s2_q <= s2_d;
    if (s2_v) begin
      out_tag       <= s2_q.tag;
      out_result    <= s2_q.special ? s2_q.spec_res : rnd_res;
      out_exc       <= s2_q.special ? s2_q.spec_exc : rnd_exc;
      out_fcc       <= s2_q.fcc;
      out_fcc_valid <= s2_q.fcc_valid;
    end
  end

  assign busy = s1_v | s2_v | out_valid;

endmodule
