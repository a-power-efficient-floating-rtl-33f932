// fpu_pkg: types, constants and opcodes shared by the floating-point co-processor.
//
// The co-processor works on IEEE-754 single- and double-precision numbers. An
// operand is a packed fp64_t (sign, 11-bit biased exponent, 52-bit fraction);
// a single occupies the low 32 bits of one and is widened exactly to double
// format (sgl_to_dbl) before any arithmetic, and special single results are
// narrowed back with special_to_sgl. Instructions
// are SPARC V8 FPop1/FPop2 words; the opf codes below are those of the SPARC V8
// architecture. The rounding-mode encoding is the SPARC FSR.RD field. Pipeline
// latencies are the cycle counts from an accepted issue to the result on the
// shared result port; they are fixed so that the issue controller can reserve
// the result port at issue time (this design's choice).
package fpu_pkg;

  localparam int EXP_W  = 11;
  localparam int FRAC_W = 52;
  localparam int BIAS   = 1023;
  localparam int TAG_W  = 5;     // destination register number carried with an op

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  expo;
    logic [FRAC_W-1:0] mant;
  } fp64_t;

  // SPARC FSR.RD rounding direction
  typedef enum logic [1:0] {
    RM_NEAREST = 2'd0,
    RM_ZERO    = 2'd1,
    RM_POS_INF = 2'd2,
    RM_NEG_INF = 2'd3
  } rmode_e;

  // Execution pipeline selected by the decoder
  typedef enum logic [1:0] {
    UNIT_NONE = 2'd0,
    UNIT_ADD  = 2'd1,
    UNIT_MUL  = 2'd2,
    UNIT_DIV  = 2'd3
  } unit_e;

  // Operation inside a pipeline. The precision of the operands and of the
  // result travel separately (src_sp, dst_sp), so OP_ITOF covers FiTOs and
  // FiTOd, OP_FTOI FsTOi and FdTOi, OP_CVT FsTOd and FdTOs.
  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,
    OP_SUB  = 4'd1,
    OP_CMP  = 4'd2,
    OP_CMPE = 4'd3,
    OP_ITOF = 4'd4,
    OP_FTOI = 4'd5,
    OP_MUL  = 4'd6,
    OP_DIV  = 4'd7,
    OP_CVT  = 4'd8,
    OP_MOV  = 4'd9,
    OP_NEG  = 4'd10,
    OP_ABS  = 4'd11
  } fpop_e;

  // IEEE exception flags in SPARC cexc order (nv, of, uf, dz, nx)
  typedef struct packed {
    logic nv;
    logic of;
    logic uf;
    logic dz;
    logic nx;
  } fexc_t;

  // SPARC fcc values written by FCMPd / FCMPEd
  localparam logic [1:0] FCC_EQ = 2'd0;
  localparam logic [1:0] FCC_LT = 2'd1;
  localparam logic [1:0] FCC_GT = 2'd2;
  localparam logic [1:0] FCC_UN = 2'd3;

  // SPARC V8 instruction fields
  localparam logic [1:0] OP_FMT3   = 2'b10;
  localparam logic [5:0] OP3_FPOP1 = 6'h34;
  localparam logic [5:0] OP3_FPOP2 = 6'h35;

  localparam logic [8:0] OPF_FMOVS  = 9'h001;
  localparam logic [8:0] OPF_FNEGS  = 9'h005;
  localparam logic [8:0] OPF_FABSS  = 9'h009;
  localparam logic [8:0] OPF_FADDS  = 9'h041;
  localparam logic [8:0] OPF_FADDD  = 9'h042;
  localparam logic [8:0] OPF_FSUBS  = 9'h045;
  localparam logic [8:0] OPF_FSUBD  = 9'h046;
  localparam logic [8:0] OPF_FMULS  = 9'h049;
  localparam logic [8:0] OPF_FMULD  = 9'h04A;
  localparam logic [8:0] OPF_FDIVS  = 9'h04D;
  localparam logic [8:0] OPF_FDIVD  = 9'h04E;
  localparam logic [8:0] OPF_FSMULD = 9'h069;
  localparam logic [8:0] OPF_FITOS  = 9'h0C4;
  localparam logic [8:0] OPF_FDTOS  = 9'h0C6;
  localparam logic [8:0] OPF_FITOD  = 9'h0C8;
  localparam logic [8:0] OPF_FSTOD  = 9'h0C9;
  localparam logic [8:0] OPF_FSTOI  = 9'h0D1;
  localparam logic [8:0] OPF_FDTOI  = 9'h0D2;
  localparam logic [8:0] OPF_FCMPS  = 9'h051;
  localparam logic [8:0] OPF_FCMPD  = 9'h052;
  localparam logic [8:0] OPF_FCMPES = 9'h055;
  localparam logic [8:0] OPF_FCMPED = 9'h056;

  // Fixed pipeline latencies (issue cycle to result-valid cycle)
  localparam int LAT_ADD  = 3;
  localparam int LAT_MUL  = 3;
  localparam int SRT_ITER = 28;              // radix-4 digits for 53+1 quotient bits
  localparam int LAT_DIV  = SRT_ITER + 4;
  localparam int LAT_MAX  = LAT_DIV;

  // Default quiet NaN produced by invalid operations (SPARC: all fraction bits set)
  localparam fp64_t QNAN_DEFAULT = '{sign: 1'b0, expo: '1, mant: '1};

  // Operands with a zero exponent (zero and subnormal) are read as zero
  function automatic logic fp_is_zero(fp64_t a);
    return a.expo == '0;
  endfunction

  function automatic logic fp_is_inf(fp64_t a);
    return (a.expo == '1) && (a.mant == '0);
  endfunction

  function automatic logic fp_is_nan(fp64_t a);
    return (a.expo == '1) && (a.mant != '0);
  endfunction

  function automatic logic fp_is_snan(fp64_t a);
    return fp_is_nan(a) && !a.mant[FRAC_W-1];
  endfunction

  // NaN propagation: first NaN operand (rs1, then rs2), made quiet
  function automatic fp64_t fp_nan_prop(fp64_t a, fp64_t b);
    fp64_t r;
    r = fp_is_nan(a) ? a : b;
    r.mant[FRAC_W-1] = 1'b1;
    return r;
  endfunction

  // Single-precision operand (low word) widened exactly to double format.
  // Zero and subnormal singles become zero; infinities and NaNs keep their
  // payload in the top fraction bits.
  function automatic fp64_t sgl_to_dbl(logic [31:0] s);
    fp64_t d;
    d.sign = s[31];
    d.mant = {s[22:0], 29'h0};
    if (s[30:23] == 8'h00)      begin d.expo = '0; d.mant = '0; end
    else if (s[30:23] == 8'hFF) d.expo = '1;
    else                        d.expo = 11'(s[30:23]) + 11'd896;   // 1023 - 127
    return d;
  endfunction

  // Zero, infinity or NaN in double format narrowed to a single (low word)
  function automatic fp64_t special_to_sgl(fp64_t d);
    return {32'h0, d.sign, (d.expo == '1) ? 8'hFF : 8'h00, d.mant[51:29]};
  endfunction

  // Significand with hidden bit, or zero for a zero/subnormal operand
  function automatic logic [FRAC_W:0] fp_sig(fp64_t a);
    return fp_is_zero(a) ? '0 : {1'b1, a.mant};
  endfunction

endpackage
