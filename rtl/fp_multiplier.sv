// fp_multiplier: the floating-point multiplier execution pipeline (FMULs,
// FMULd, FsMULd).
//
// Single-precision operands (src_sp, low word of a and b) are widened exactly
// to double format on entry, so one 53x53-bit datapath serves all three ops;
// dst_sp makes the last stage round to single and pack into the low word.
//
// Three stages, each ending in a register clocked by the pipeline's gated clock:
//   1. unpack the operands, compute the sign (xor) and exponent (ea+eb-bias),
//      resolve special operands, and reduce the 53x53-bit significand product:
//      radix-4 Booth recoding (booth_r4_pp) gives 27 summands plus one
//      correction row, which a Wallace tree of carry-save adders (wallace_tree)
//      reduces to a sum row and a carry row. Those two 106-bit rows are
//      registered.
//   2. a carry-propagate adder (cpa) adds the two rows into the 106-bit
//      product in [1,4); it is normalized to 53 bits plus guard, round and
//      sticky, raising the exponent by one when the product is 2 or more.
//   3. round and pack (fp_round_pack) into the output register.
// Interface: in_valid/src_sp/dst_sp/rm/tag/a/b are sampled at a rising edge
// of clk; the product appears LAT_MUL (3) cycles later with out_valid high for
// one cycle, and a new op can enter every cycle. busy is high while any stage holds an op.
// Booth recoding, Wallace tree and carry-propagate adder follow the design's
// multiplier; where the pipeline registers sit is this design's choice.
module fp_multiplier
  import fpu_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
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

  localparam int SW = FRAC_W + 1;        // significand width, 53
  localparam int PW = 2 * SW;            // product width, 106
  localparam int ND = ((SW + 2) / 2);    // Booth digits, 27

  // ------------------------------------------------------------------ stage 1
  typedef struct packed {
    logic              sign;
    logic              zero;
    logic signed [12:0] exp;
    logic [PW-1:0]     psum;
    logic [PW-1:0]     pcarry;
    logic              special;
    fp64_t             spec_res;
    fexc_t             spec_exc;
    logic              sp;
    rmode_e            rm;
    logic [TAG_W-1:0]  tag;
  } s1_t;

  s1_t  s1_d, s1_q;
  logic s1_v;

  fp64_t               au, bu;   // operands in double format
  logic [ND:0][PW-1:0] pp;

  // single operands are widened exactly; the product of two widened
  // singles is exact in 106 bits, so FsMULd needs no extra path
  assign au = src_sp ? sgl_to_dbl(a[31:0]) : a;
  assign bu = src_sp ? sgl_to_dbl(b[31:0]) : b;
  logic [PW-1:0]       tsum, tcarry;

  booth_r4_pp #(.W(SW)) u_booth (
    .a  (fp_sig(au)),
    .b  (fp_sig(bu)),
    .pp (pp)
  );

  wallace_tree #(.N(ND + 1), .W(PW)) u_tree (
    .rows  (pp),
    .sum   (tsum),
    .carry (tcarry)
  );

  always_comb begin
    s1_d        = '0;
    s1_d.rm     = rm;
    s1_d.tag    = tag;
    s1_d.sp     = dst_sp;
    s1_d.sign   = au.sign ^ bu.sign;
    s1_d.zero   = fp_is_zero(au) || fp_is_zero(bu);
    s1_d.exp    = $signed(13'(au.expo)) + $signed(13'(bu.expo)) - 13'sd1023;
    s1_d.psum   = tsum;
    s1_d.pcarry = tcarry;
    if (fp_is_nan(au) || fp_is_nan(bu)) begin
      s1_d.special     = 1'b1;
      s1_d.spec_res    = fp_nan_prop(au, bu);
      s1_d.spec_exc.nv = fp_is_snan(au) || fp_is_snan(bu);
    end else if ((fp_is_inf(au) && fp_is_zero(bu)) || (fp_is_zero(au) && fp_is_inf(bu))) begin
      s1_d.special     = 1'b1;
      s1_d.spec_res    = QNAN_DEFAULT;
      s1_d.spec_exc.nv = 1'b1;
    end else if (fp_is_inf(au) || fp_is_inf(bu)) begin
      s1_d.special  = 1'b1;
      s1_d.spec_res = '{sign: s1_d.sign, expo: '1, mant: '0};
    end
    if (dst_sp) s1_d.spec_res = special_to_sgl(s1_d.spec_res);
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
    logic              sp;
    rmode_e            rm;
    logic [TAG_W-1:0]  tag;
  } s2_t;

  s2_t  s2_d, s2_q;
  logic s2_v;

  logic [PW-1:0] prod;
  logic          prod_cout;

  cpa #(.W(PW)) u_cpa (
    .a    (s1_q.psum),
    .b    (s1_q.pcarry),
    .cin  (1'b0),
    .s    (prod),
    .cout (prod_cout)
  );

  always_comb begin
    s2_d          = '0;
    s2_d.sign     = s1_q.sign;
    s2_d.zero     = s1_q.zero;
    s2_d.special  = s1_q.special;
    s2_d.spec_res = s1_q.spec_res;
    s2_d.spec_exc = s1_q.spec_exc;
    s2_d.sp       = s1_q.sp;
    s2_d.rm       = s1_q.rm;
    s2_d.tag      = s1_q.tag;
    if (prod[PW-1]) begin
      s2_d.exp = s1_q.exp + 13'sd1;
      s2_d.sig = {prod[PW-1 -: 55], |prod[PW-56:0]};
    end else begin
      s2_d.exp = s1_q.exp;
      s2_d.sig = {prod[PW-2 -: 55], |prod[PW-57:0]};
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
      out_tag    <= s2_q.tag;
      out_result <= s2_q.special ? s2_q.spec_res : rnd_res;
      out_exc    <= s2_q.special ? s2_q.spec_exc : rnd_exc;
    end
  end

  assign busy = s1_v | s2_v | out_valid;

endmodule
