// fpu_decoder: FPop decoder in the integer unit's decode stage.
//
// Decodes a SPARC V8 format-3 instruction word (op = 2, op3 = FPop1 0x34 or
// FPop2 0x35) by its 9-bit opf field into the execution pipeline that runs
// it, the operation inside that pipeline, the operand and result precisions
// (src_sp, dst_sp) and the destination register number (rd, inst[29:25])
// carried with the op as its tag. It also produces one clock-gating enable
// per pipeline (adder, multiplier, divider): only the pipeline an instruction
// is decoded to gets its clock enabled, which is how the co-processor keeps
// unused pipelines clock-gated. All single and double FPops of SPARC V8
// except square root are decoded; an FPop that this co-processor does not
// execute (square root, anything with a quad operand or result) raises
// unimpl instead of valid.
// Combinational: all outputs follow inst and inst_valid in the same cycle.
// The decoder-driven gating follows the design; the grouping of moves,
// compares and conversions into the adder pipeline is this design's choice.
module fpu_decoder
  import fpu_pkg::*;
(
  input  logic             inst_valid,
  input  logic [31:0]      inst,
  output logic             valid,
  output logic             unimpl,
  output unit_e            unit,
  output fpop_e            op,
  output logic             src_sp,  // operands are single precision
  output logic             dst_sp,  // result is single precision
  output logic [TAG_W-1:0] tag,
  output logic [2:0]       cg_en    // {div, mul, add}
);

  logic       is_fpop;
  logic [5:0] op3;
  logic [8:0] opf;

  always_comb begin
    op3     = inst[24:19];
    opf     = inst[13:5];
    is_fpop = inst_valid && (inst[31:30] == OP_FMT3) && (op3 == OP3_FPOP1 || op3 == OP3_FPOP2);
    tag     = inst[29:25];
    unit    = UNIT_NONE;
    op      = OP_ADD;
    src_sp  = 1'b0;
    dst_sp  = 1'b0;
    if (op3 == OP3_FPOP1) begin
      unique case (opf)
        OPF_FMOVS:  begin unit = UNIT_ADD; op = OP_MOV;  end
        OPF_FNEGS:  begin unit = UNIT_ADD; op = OP_NEG;  end
        OPF_FABSS:  begin unit = UNIT_ADD; op = OP_ABS;  end
        OPF_FADDS:  begin unit = UNIT_ADD; op = OP_ADD;  src_sp = 1'b1; dst_sp = 1'b1; end
        OPF_FADDD:  begin unit = UNIT_ADD; op = OP_ADD;  end
        OPF_FSUBS:  begin unit = UNIT_ADD; op = OP_SUB;  src_sp = 1'b1; dst_sp = 1'b1; end
        OPF_FSUBD:  begin unit = UNIT_ADD; op = OP_SUB;  end
        OPF_FITOS:  begin unit = UNIT_ADD; op = OP_ITOF; dst_sp = 1'b1; end
        OPF_FITOD:  begin unit = UNIT_ADD; op = OP_ITOF; end
        OPF_FSTOI:  begin unit = UNIT_ADD; op = OP_FTOI; src_sp = 1'b1; end
        OPF_FDTOI:  begin unit = UNIT_ADD; op = OP_FTOI; end
        OPF_FSTOD:  begin unit = UNIT_ADD; op = OP_CVT;  src_sp = 1'b1; end
        OPF_FDTOS:  begin unit = UNIT_ADD; op = OP_CVT;  dst_sp = 1'b1; end
        OPF_FMULS:  begin unit = UNIT_MUL; op = OP_MUL;  src_sp = 1'b1; dst_sp = 1'b1; end
        OPF_FMULD:  begin unit = UNIT_MUL; op = OP_MUL;  end
        OPF_FSMULD: begin unit = UNIT_MUL; op = OP_MUL;  src_sp = 1'b1; end
        OPF_FDIVS:  begin unit = UNIT_DIV; op = OP_DIV;  src_sp = 1'b1; dst_sp = 1'b1; end
        OPF_FDIVD:  begin unit = UNIT_DIV; op = OP_DIV;  end
        default: ;
      endcase
    end else begin
      unique case (opf)
        OPF_FCMPS:  begin unit = UNIT_ADD; op = OP_CMP;  src_sp = 1'b1; end
        OPF_FCMPD:  begin unit = UNIT_ADD; op = OP_CMP;  end
        OPF_FCMPES: begin unit = UNIT_ADD; op = OP_CMPE; src_sp = 1'b1; end
        OPF_FCMPED: begin unit = UNIT_ADD; op = OP_CMPE; end
        default: ;
      endcase
    end
    valid  = is_fpop && (unit != UNIT_NONE);
    unimpl = is_fpop && (unit == UNIT_NONE);
    cg_en  = {valid && unit == UNIT_DIV, valid && unit == UNIT_MUL, valid && unit == UNIT_ADD};
  end

endmodule
