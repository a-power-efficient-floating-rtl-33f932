// tb_fpu_decoder: checks FPop decoding and the clock-gating enables.
//
// Every opf value under both FPop opcodes, plus random non-FPop words and
// inst_valid low, is decoded and compared with the testbench's own table of
// the SPARC V8 single and double FPops (square root and quad unimplemented):
// pipeline, operation, operand/result precision, rd tag, valid/unimplemented, and a one-hot gating enable for exactly the selected
// pipeline (none for anything else).
module tb_fpu_decoder;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

  logic inst_valid;
  logic [31:0] inst;
  logic valid, unimpl;
  unit_e unit;
  fpop_e op;
  logic src_sp, dst_sp;
  logic [TAG_W-1:0] tag;
  logic [2:0] cg_en;
  int checks = 0, failures = 0;

  fpu_decoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ev, logic eu, unit_e un, fpop_e o, logic ess = 1'b0,
                        logic eds = 1'b0);
    logic [2:0] ecg;
    #1;
    ecg = '0;
    if (ev) ecg[int'(un) - 1] = 1'b1;
    checks++;
    if (valid != ev || unimpl != eu || cg_en != ecg || tag != inst[29:25]
        || (ev && (unit != un || op != o || src_sp != ess || dst_sp != eds))) begin
      failures++;
      if (failures < 20)
        $display("FAIL inst=%h valid=%b/%b unimpl=%b/%b unit=%0d/%0d op=%0d/%0d sp=%b%b/%b%b cg=%b",
                 inst, valid, ev, unimpl, eu, unit, un, op, o, src_sp, dst_sp, ess, eds, cg_en);
    end
  endtask

  initial begin
    inst_valid = 1'b1;
    for (int f2 = 0; f2 < 2; f2++) begin
      for (int opf = 0; opf < 512; opf++) begin
        logic ok, ss, ds;
        unit_e un;
        fpop_e o;
        ok = 1'b1; un = UNIT_NONE; o = OP_ADD; ss = 1'b0; ds = 1'b0;
        if (f2 == 0) begin
          case (opf)
            'h01: begin un = UNIT_ADD; o = OP_MOV;  end
            'h05: begin un = UNIT_ADD; o = OP_NEG;  end
            'h09: begin un = UNIT_ADD; o = OP_ABS;  end
            'h41: begin un = UNIT_ADD; o = OP_ADD;  ss = 1; ds = 1; end
            'h42: begin un = UNIT_ADD; o = OP_ADD;  end
            'h45: begin un = UNIT_ADD; o = OP_SUB;  ss = 1; ds = 1; end
            'h46: begin un = UNIT_ADD; o = OP_SUB;  end
            'hC4: begin un = UNIT_ADD; o = OP_ITOF; ds = 1; end
            'hC8: begin un = UNIT_ADD; o = OP_ITOF; end
            'hD1: begin un = UNIT_ADD; o = OP_FTOI; ss = 1; end
            'hD2: begin un = UNIT_ADD; o = OP_FTOI; end
            'hC9: begin un = UNIT_ADD; o = OP_CVT;  ss = 1; end
            'hC6: begin un = UNIT_ADD; o = OP_CVT;  ds = 1; end
            'h49: begin un = UNIT_MUL; o = OP_MUL;  ss = 1; ds = 1; end
            'h4A: begin un = UNIT_MUL; o = OP_MUL;  end
            'h69: begin un = UNIT_MUL; o = OP_MUL;  ss = 1; end
            'h4D: begin un = UNIT_DIV; o = OP_DIV;  ss = 1; ds = 1; end
            'h4E: begin un = UNIT_DIV; o = OP_DIV;  end
            default: ok = 1'b0;
          endcase
        end else begin
          case (opf)
            'h51: begin un = UNIT_ADD; o = OP_CMP;  ss = 1; end
            'h52: begin un = UNIT_ADD; o = OP_CMP;  end
            'h55: begin un = UNIT_ADD; o = OP_CMPE; ss = 1; end
            'h56: begin un = UNIT_ADD; o = OP_CMPE; end
            default: ok = 1'b0;
          endcase
        end
        inst = fpop(9'(opf), 5'($urandom()), 1'(f2));
        check(ok, !ok, un, o, ss, ds);
      end
    end
    // not an FPop: neither valid nor unimplemented
    for (int i = 0; i < 500; i++) begin
      inst = $urandom();
      if (inst[31:30] == 2'b10 && (inst[24:19] == 6'h34 || inst[24:19] == 6'h35)) inst[31] = 1'b0;
      check(1'b0, 1'b0, UNIT_NONE, OP_ADD);
    end
    inst_valid = 1'b0;
    inst = fpop(9'h042, 5'd3, 1'b0);
    check(1'b0, 1'b0, UNIT_NONE, OP_ADD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
