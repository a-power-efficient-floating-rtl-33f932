// tb_fpu_top: end-to-end test of the co-processor at its default configuration.
//
// Streams a random program of every executed SPARC FPop, single and double
// (add, subtract, multiply incl. FsMULd, divide, compares, int/float and
// single/double conversions, FMOVs/FNEGs/FABSs) and of unimplemented FPops
// (FSQRTd, quad ops) with random operands, rounding modes, back-to-back issue
// and idle gaps. Every result is
// checked against the reference arithmetic of tb_fp_ref_pkg, on the exact
// cycle it is due (issue cycle + pipeline latency) and with its rd tag. The
// test also checks the clock gating: each pipeline's gated clock must tick
// exactly on the cycles its enable is high. It counts how often each
// mechanism happens -- clock gating of each pipeline while another works,
// stalls for a busy divider and for a result-port conflict, unimplemented
// FPops, overflow, underflow, invalid operations, division by zero, each
// rounding mode, each executed FPop -- and fails if one never happened.
module tb_fpu_top;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int NINST = 4000;

  // every executed FPop as {FPop2, opf}
  localparam logic [9:0] ALL_OPS [22] = '{
    {1'b0, OPF_FMOVS}, {1'b0, OPF_FNEGS}, {1'b0, OPF_FABSS}, {1'b0, OPF_FADDS},
    {1'b0, OPF_FADDD}, {1'b0, OPF_FSUBS}, {1'b0, OPF_FSUBD}, {1'b0, OPF_FMULS},
    {1'b0, OPF_FMULD}, {1'b0, OPF_FSMULD}, {1'b0, OPF_FDIVS}, {1'b0, OPF_FDIVD},
    {1'b0, OPF_FITOS}, {1'b0, OPF_FITOD}, {1'b0, OPF_FSTOI}, {1'b0, OPF_FDTOI},
    {1'b0, OPF_FSTOD}, {1'b0, OPF_FDTOS}, {1'b1, OPF_FCMPS}, {1'b1, OPF_FCMPD},
    {1'b1, OPF_FCMPES}, {1'b1, OPF_FCMPED}};

  logic clk = 1'b0, rst_n = 1'b0;
  logic inst_valid = 1'b0;
  logic [31:0] inst = '0;
  rmode_e rm = RM_NEAREST;
  fp64_t rs1 = '0, rs2 = '0;
  logic inst_ready, inst_unimpl, res_valid, res_fcc_valid;
  logic [TAG_W-1:0] res_tag;
  fp64_t res_data;
  fexc_t res_exc;
  logic [1:0] res_fcc;
  logic [2:0] pipe_clk_en;

  fpu_top dut (.*);

  typedef struct packed {
    fp64_t res; fexc_t exc; logic fccv; logic [1:0] fcc; logic [TAG_W-1:0] tag;
  } exp_t;
  exp_t due [int];

  int checks = 0, failures = 0, cycle = 0;
  int n_gated [3], en_edges [3], clk_edges [3];
  int n_stall_div = 0, n_stall_port = 0, n_unimpl = 0;
  int n_of = 0, n_uf = 0, n_nv = 0, n_dz = 0;
  int n_rm [4];
  int n_opf [logic [9:0]];                 // issues per {FPop2, opf}

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // gated clocks: count their edges and the enabled cycles
  always @(posedge dut.add_clk) if (rst_n) clk_edges[0]++;
  always @(posedge dut.mul_clk) if (rst_n) clk_edges[1]++;
  always @(posedge dut.div_clk) if (rst_n) clk_edges[2]++;

  always @(negedge clk) if (rst_n) begin
    for (int u = 0; u < 3; u++) begin
      if (pipe_clk_en[u]) en_edges[u]++;
      else if (pipe_clk_en != 3'b000) n_gated[u]++;
    end
  end

  // result checker: a result is due on exactly one cycle
  always @(negedge clk) if (rst_n) begin
    if (res_valid) begin
      checks++;
      if (!due.exists(cycle)) begin
        failures++;
        $display("FAIL cycle %0d: unexpected result %h", cycle, res_data);
      end else begin
        exp_t e;
        e = due[cycle];
        if (res_tag != e.tag || res_exc != e.exc || res_fcc_valid != e.fccv
            || (e.fccv ? res_fcc != e.fcc : res_data != e.res)) begin
          failures++;
          if (failures < 20)
            $display("FAIL cycle %0d tag %0d/%0d res %h/%h exc %b/%b fcc %0d/%0d", cycle,
                     res_tag, e.tag, res_data, e.res, res_exc, e.exc, res_fcc, e.fcc);
        end
        if (e.exc.of) n_of++;
        if (e.exc.uf) n_uf++;
        if (e.exc.nv) n_nv++;
        if (e.exc.dz) n_dz++;
        due.delete(cycle);
      end
    end else if (due.exists(cycle)) begin
      failures++;
      checks++;
      $display("FAIL cycle %0d: result missing", cycle);
      due.delete(cycle);
    end
  end

  // present one instruction (at the start of a cycle) until it is accepted
  task automatic send(logic [8:0] opf, logic fpop2, fp64_t a, fp64_t b, rmode_e m, int lat, exp_t e);
    inst_valid = 1'b1;
    inst = fpop(opf, 5'($urandom()), fpop2);
    rs1 = a; rs2 = b; rm = m;
    e.tag = inst[29:25];
    if (lat != 0) n_opf[{fpop2, opf}]++;
    @(negedge clk);
    while (!inst_ready) begin
      if (dut.dec_unit == UNIT_DIV && !dut.div_ready) n_stall_div++;
      else n_stall_port++;
      @(negedge clk);
    end
    if (lat == 0) begin
      checks++;
      n_unimpl++;
      if (!inst_unimpl) begin
        failures++;
        $display("FAIL unimplemented FPop not flagged");
      end
    end else begin
      checks++;
      if (inst_unimpl) begin
        failures++;
        $display("FAIL implemented FPop flagged");
      end
      due[cycle + lat] = e;
    end
    @(posedge clk);
    #1;
  endtask

  task automatic send_r(logic [8:0] opf, fp64_t a, fp64_t b, rmode_e m, int lat, ref_t r);
    exp_t e;
    e = '0;
    e.res = r.res; e.exc = r.exc;
    send(opf, 1'b0, a, b, m, lat, e);
  endtask

  function automatic fp64_t sgl(fp64_t x);
    return sgl_to_dbl(x[31:0]);
  endfunction

  // single operand in the low word, random upper word (ignored)
  function automatic fp64_t operand_sp();
    fp64_t x;
    x = ($urandom_range(0, 4) == 0) ? rand_sp(1, 254) : rand_sp(100, 160);
    x[63:32] = $urandom();
    return x;
  endfunction

  function automatic fp64_t operand();
    return ($urandom_range(0, 4) == 0) ? rand_fp(1, 2046) : rand_fp(900, 1150);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < NINST; i++) begin
      int    k;
      fp64_t a, b;
      rmode_e m;
      exp_t  e;
      ref_t  r;
      logic  sp;
      k = $urandom_range(0, 99);
      a = operand();
      b = operand();
      m = rmode_e'($urandom_range(0, 3));
      e = '0;
      if (i == 0) begin
        // the worked example of the design: 234 + 234, exponent 1030 -> 1031
        a = $realtobits(234.0); b = a; m = RM_NEAREST; k = 0;
      end
      n_rm[m]++;
      sp = 1'($urandom());
      if (sp && i != 0) begin
        a = operand_sp();
        b = operand_sp();
      end else sp = 1'b0;
      if (k < 26) begin
        logic sub;
        sub = (k >= 13);
        r = sp ? ref_add(sgl(a), sgl(b), sub, m, 1'b1) : ref_add(a, b, sub, m);
        e.res = r.res; e.exc = r.exc;
        send(sp ? (sub ? OPF_FSUBS : OPF_FADDS) : (sub ? OPF_FSUBD : OPF_FADDD), 1'b0,
             a, b, m, LAT_ADD, e);
      end else if (k < 48) begin
        if (!sp) begin
          r = ref_mul(a, b, m);
          send_r(OPF_FMULD, a, b, m, LAT_MUL, r);
        end else if (k < 37) begin
          r = ref_mul(sgl(a), sgl(b), m, 1'b1);
          send_r(OPF_FMULS, a, b, m, LAT_MUL, r);
        end else begin
          r = ref_mul(sgl(a), sgl(b), m);
          send_r(OPF_FSMULD, a, b, m, LAT_MUL, r);
        end
      end else if (k < 58) begin
        if (k == 57) b = '0;                               // division by zero
        if (sp ? b[30:23] == 0 : b.expo == 0) begin
          e.res = sp ? {32'h0, a[31] ^ b[31], 31'h7F80_0000}
                     : '{sign: a.sign ^ b.sign, expo: '1, mant: '0};
          e.exc.dz = 1'b1;
        end else begin
          r = sp ? ref_div(sgl(a), sgl(b), m, 1'b1) : ref_div(a, b, m);
          e.res = r.res; e.exc = r.exc;
        end
        send(sp ? OPF_FDIVS : OPF_FDIVD, 1'b0, a, b, m, LAT_DIV, e);
      end else if (k < 68) begin
        logic cmpe;
        cmpe = (k >= 63);
        if (k == 62 || k == 67) b = sp ? 64'h7FC0_0000 : 64'h7FF8_0000_0000_0000;   // unordered
        if (k % 3 == 0) b = a;
        e.fccv = 1'b1;
        if (sp ? fp_is_nan(sgl(b)) : fp_is_nan(b)) begin
          e.fcc = FCC_UN;
          e.exc.nv = cmpe;
        end else e.fcc = sp ? ref_cmp(sgl(a), sgl(b)) : ref_cmp(a, b);
        send(sp ? (cmpe ? OPF_FCMPES : OPF_FCMPS) : (cmpe ? OPF_FCMPED : OPF_FCMPD), 1'b1,
             a, b, m, LAT_ADD, e);
      end else if (k < 74) begin
        int v;
        longint mag;
        v = $urandom();
        b = {32'h0, v};
        if (sp) begin
          mag = (v < 0) ? -longint'(v) : longint'(v);
          r = ref_round(v < 0, 128'(mag), 0, m, 1'b1);
          send_r(OPF_FITOS, a, b, m, LAT_ADD, r);
        end else begin
          e.res = $realtobits($itor(v));
          send(OPF_FITOD, 1'b0, a, b, m, LAT_ADD, e);
        end
      end else if (k < 80) begin
        if (sp) begin
          b = rand_sp(120, 160);
          r = ref_dtoi(sgl(b));
          send_r(OPF_FSTOI, a, b, m, LAT_ADD, r);
        end else begin
          b = rand_fp(1000, 1056);
          r = ref_dtoi(b);
          send_r(OPF_FDTOI, a, b, m, LAT_ADD, r);
        end
      end else if (k < 86) begin
        if (sp) begin
          e.res = sgl(b);                                  // exact
          send(OPF_FSTOD, 1'b0, a, b, m, LAT_ADD, e);
        end else begin
          b = rand_fp(850, 1180);
          r = ref_round(b.sign, sig_of(b), int'(b.expo) - 1075, m, 1'b1);
          send_r(OPF_FDTOS, a, b, m, LAT_ADD, r);
        end
      end else if (k < 90) begin
        logic [8:0] mv;
        mv = (k == 86) ? OPF_FMOVS : (k == 87) ? OPF_FNEGS : OPF_FABSS;
        b = {32'($urandom()), 32'($urandom())};
        e.res = {32'h0, (mv == OPF_FMOVS) ? b[31] : (mv == OPF_FNEGS) ? !b[31] : 1'b0, b[30:0]};
        send(mv, 1'b0, a, b, m, LAT_ADD, e);
      end else if (k < 93) begin
        // FSQRTd and quad FPops: not executed here
        send((k == 90) ? 9'h02A : (k == 91) ? 9'h043 : 9'h0CB, 1'b0, a, b, m, 0, e);
      end else begin
        // idle gap: pipelines drain and are clock-gated
        inst_valid = 1'b0;
        repeat ($urandom_range(1, 40)) @(posedge clk);
        #1;
      end
      if ($urandom_range(0, 3) == 0) begin
        inst_valid = 1'b0;
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
      end
    end
    inst_valid = 1'b0;
    repeat (LAT_MAX + 5) @(posedge clk);
    @(negedge clk);

    // every gated clock ticks exactly on its enabled cycles
    for (int u = 0; u < 3; u++) begin
      checks++;
      if (clk_edges[u] != en_edges[u]) begin
        failures++;
        $display("FAIL pipeline %0d: %0d gated edges for %0d enabled cycles", u, clk_edges[u], en_edges[u]);
      end
    end
    checks++;
    if (due.size() != 0) begin
      failures++;
      $display("FAIL %0d results never arrived", due.size());
    end

    $display("gated cycles add/mul/div: %0d %0d %0d", n_gated[0], n_gated[1], n_gated[2]);
    $display("stalls divider busy: %0d, result port: %0d; unimplemented FPops: %0d",
             n_stall_div, n_stall_port, n_unimpl);
    $display("overflow %0d underflow %0d invalid %0d divide-by-zero %0d", n_of, n_uf, n_nv, n_dz);
    $display("rounding modes: %0d %0d %0d %0d", n_rm[0], n_rm[1], n_rm[2], n_rm[3]);
    $display("distinct FPops issued: %0d", n_opf.num());
    for (int u = 0; u < 3; u++) begin
      checks++;
      if (n_gated[u] == 0) begin failures++; $display("FAIL pipeline %0d never gated", u); end
    end
    checks++;
    if (n_stall_div == 0 || n_stall_port == 0 || n_unimpl == 0 || n_of == 0 || n_uf == 0
        || n_nv == 0 || n_dz == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    foreach (ALL_OPS[i]) begin
      checks++;
      if (!n_opf.exists(ALL_OPS[i])) begin
        failures++;
        $display("FAIL FPop %h never issued", ALL_OPS[i]);
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_rm[i] == 0) begin failures++; $display("FAIL rounding mode %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
