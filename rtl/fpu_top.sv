// fpu_top: SPARC V8 compatible single/double-precision floating-point
// co-processor with decoder-driven clock gating of its execution pipelines.
//
// The integer unit presents an FPop instruction with its two source operands
// (rs1, rs2 from the floating-point register file) and the FSR rounding mode.
// The decoder (fpu_decoder) selects one of three independent execution
// pipelines -- adder (add, subtract, compare, int<->float and single<->double
// conversion, moves), multiplier and divider -- and raises the clock-gating
// enable of that pipeline only. Each pipeline runs on its own gated clock
// (clock_gate) that is enabled while the decoder selects it or while it still
// holds an op, so a pipeline that is not in use receives no clock edges at
// all. The decoder, the issue controller and the result port stay on the
// free-running clock.
// The issue controller (fpu_issue_ctrl) holds an instruction back (inst_ready
// low) while the divider is busy or while its result would meet another
// pipeline's result on the single result port.
// Interface: an instruction is taken at a rising edge of clk when inst_valid
// and inst_ready are high. Results leave on res_* with res_valid for one
// cycle, tagged with the destination register (rd) of the instruction:
// LAT_ADD (3) cycles after issue for adder ops, LAT_MUL (3) for multiply,
// LAT_DIV (32) for divide. A compare returns the SPARC fcc on res_fcc with
// res_fcc_valid; FsTOi/FdTOi return the integer in res_data[31:0].
// Single-precision operands are read from, and single results returned in,
// the low 32 bits of rs1/rs2/res_data (the upper word of a single result is
// zero). res_exc holds
// the IEEE exception flags of the op (nv, of, uf, dz, nx). An FPop that is
// not executed here raises inst_unimpl in the cycle it is presented.
// pipe_clk_en shows the three gating enables {div, mul, add}; all three are
// forced on while rst_n is low so that the pipelines are reset like the rest.
// Three pipelines, decoder-generated gating and the SRT divider follow the
// design; operand/result ports in place of a register file, the fixed
// latencies and the result-port reservation are this design's choices.
module fpu_top
  import fpu_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inst_valid,
  input  logic [31:0]      inst,
  input  rmode_e           rm,
  input  fp64_t            rs1,
  input  fp64_t            rs2,
  output logic             inst_ready,
  output logic             inst_unimpl,
  output logic             res_valid,
  output logic [TAG_W-1:0] res_tag,
  output fp64_t            res_data,
  output fexc_t            res_exc,
  output logic [1:0]       res_fcc,
  output logic             res_fcc_valid,
  output logic [2:0]       pipe_clk_en
);

  // ---------------------------------------------------------------- decode
  logic             dec_valid;
  unit_e            dec_unit;
  fpop_e            dec_op;
  logic             dec_src_sp, dec_dst_sp;
  logic [TAG_W-1:0] dec_tag;
  logic [2:0]       dec_cg_en;

  fpu_decoder u_dec (
    .inst_valid (inst_valid),
    .inst       (inst),
    .valid      (dec_valid),
    .unimpl     (inst_unimpl),
    .unit       (dec_unit),
    .op         (dec_op),
    .src_sp     (dec_src_sp),
    .dst_sp     (dec_dst_sp),
    .tag        (dec_tag),
    .cg_en      (dec_cg_en)
  );

  // ---------------------------------------------------------------- issue
  logic issue, stall, div_ready;

  fpu_issue_ctrl u_issue (
    .clk       (clk),
    .rst_n     (rst_n),
    .dec_valid (dec_valid),
    .unit      (dec_unit),
    .div_ready (div_ready),
    .issue     (issue),
    .stall     (stall)
  );

  assign inst_ready = !stall;

  // ---------------------------------------------------------------- gating
  logic add_busy, mul_busy, div_busy;
  logic add_clk, mul_clk, div_clk;

  // clocks also run during reset, so that every pipeline register sees it
  assign pipe_clk_en = {dec_cg_en[2] | div_busy | !rst_n,
                        dec_cg_en[1] | mul_busy | !rst_n,
                        dec_cg_en[0] | add_busy | !rst_n};

  clock_gate u_cg_add (.clk(clk), .en(pipe_clk_en[0]), .gclk(add_clk));
  clock_gate u_cg_mul (.clk(clk), .en(pipe_clk_en[1]), .gclk(mul_clk));
  clock_gate u_cg_div (.clk(clk), .en(pipe_clk_en[2]), .gclk(div_clk));

  // ---------------------------------------------------------------- pipelines
  logic             add_ov, mul_ov, div_ov;
  logic [TAG_W-1:0] add_tag, mul_tag, div_tag;
  fp64_t            add_res, mul_res, div_res;
  fexc_t            add_exc, mul_exc, div_exc;
  logic [1:0]       add_fcc;
  logic             add_fcc_v;

  fp_adder u_add (
    .clk           (add_clk),
    .rst_n         (rst_n),
    .in_valid      (issue && dec_unit == UNIT_ADD),
    .op            (dec_op),
    .src_sp        (dec_src_sp),
    .dst_sp        (dec_dst_sp),
    .rm            (rm),
    .tag           (dec_tag),
    .a             (rs1),
    .b             (rs2),
    .out_valid     (add_ov),
    .out_tag       (add_tag),
    .out_result    (add_res),
    .out_exc       (add_exc),
    .out_fcc       (add_fcc),
    .out_fcc_valid (add_fcc_v),
    .busy          (add_busy)
  );

  fp_multiplier u_mul (
    .clk        (mul_clk),
    .rst_n      (rst_n),
    .in_valid   (issue && dec_unit == UNIT_MUL),
    .src_sp     (dec_src_sp),
    .dst_sp     (dec_dst_sp),
    .rm         (rm),
    .tag        (dec_tag),
    .a          (rs1),
    .b          (rs2),
    .out_valid  (mul_ov),
    .out_tag    (mul_tag),
    .out_result (mul_res),
    .out_exc    (mul_exc),
    .busy       (mul_busy)
  );

  fp_divider u_div (
    .clk        (div_clk),
    .rst_n      (rst_n),
    .in_valid   (issue && dec_unit == UNIT_DIV),
    .in_ready   (div_ready),
    .src_sp     (dec_src_sp),
    .dst_sp     (dec_dst_sp),
    .rm         (rm),
    .tag        (dec_tag),
    .a          (rs1),
    .b          (rs2),
    .out_valid  (div_ov),
    .out_tag    (div_tag),
    .out_result (div_res),
    .out_exc    (div_exc),
    .busy       (div_busy)
  );

  // ---------------------------------------------------------------- result port
  always_comb begin
    res_valid     = add_ov | mul_ov | div_ov;
    res_tag       = '0;
    res_data      = '0;
    res_exc       = '0;
    res_fcc       = '0;
    res_fcc_valid = 1'b0;
    if (add_ov) begin
      res_tag       = add_tag;
      res_data      = add_res;
      res_exc       = add_exc;
      res_fcc       = add_fcc;
      res_fcc_valid = add_fcc_v;
    end else if (mul_ov) begin
      res_tag  = mul_tag;
      res_data = mul_res;
      res_exc  = mul_exc;
    end else if (div_ov) begin
      res_tag  = div_tag;
      res_data = div_res;
      res_exc  = div_exc;
    end
  end

  // the reservation scheme guarantees one result per cycle
  a_one_result: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0({add_ov, mul_ov, div_ov}));

endmodule
