// tb_fp_adder: self-checking test of the adder pipeline.
//
// Issues one op per cycle (back to back) and checks every result against the
// exact-arithmetic reference in tb_fp_ref_pkg: random add/subtract in all four
// rounding modes (including cancellation and far-apart exponents), special
// operands, compares (ordered, unordered, signalling), FiTOd and FdTOi with
// overflow and truncation; then the same for single precision, plus FsTOd,
// FdTOs (overflow and flush at the single range) and FMOVs/FNEGs/FABSs.
// Each result must arrive exactly LAT_ADD cycles after issue, in order,
// carrying its tag.
module tb_fp_adder;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  fpop_e op = OP_ADD;
  logic src_sp = 1'b0, dst_sp = 1'b0;
  rmode_e rm = RM_NEAREST;
  logic [TAG_W-1:0] tag = '0;
  fp64_t a = '0, b = '0;
  logic out_valid, out_fcc_valid, busy;
  logic [TAG_W-1:0] out_tag;
  fp64_t out_result;
  fexc_t out_exc;
  logic [1:0] out_fcc;
  int checks = 0, failures = 0, cycle = 0;

  typedef struct packed {
    fp64_t res; fexc_t exc; logic fccv; logic [1:0] fcc; logic [TAG_W-1:0] tag; int issued;
  } exp_t;
  exp_t q[$];

  fp_adder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result checker
  always @(negedge clk) if (out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL unexpected result");
    end else begin
      e = q.pop_front();
      if (out_tag != e.tag || out_exc != e.exc || cycle - e.issued != LAT_ADD
          || out_fcc_valid != e.fccv || (e.fccv ? out_fcc != e.fcc : out_result != e.res)) begin
        failures++;
        if (failures < 20)
          $display("FAIL tag=%0d res=%h exp=%h exc=%b exp=%b fcc=%0d exp=%0d lat=%0d",
                   out_tag, out_result, e.res, out_exc, e.exc, out_fcc, e.fcc, cycle - e.issued);
      end
    end
  end

  task automatic issue(fpop_e o, rmode_e m, fp64_t x, fp64_t y, exp_t e,
                        logic ss = 1'b0, logic ds = 1'b0);
    @(posedge clk);
    #1;
    in_valid = 1'b1; op = o; rm = m; a = x; b = y; tag = 5'($urandom());
    src_sp = ss; dst_sp = ds;
    e.tag = tag; e.issued = cycle;
    q.push_back(e);
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  // back-to-back variant: leaves in_valid high between calls
  task automatic issue_b2b(fpop_e o, rmode_e m, fp64_t x, fp64_t y, exp_t e,
                            logic ss = 1'b0, logic ds = 1'b0);
    @(posedge clk);
    #1;
    in_valid = 1'b1; op = o; rm = m; a = x; b = y; tag = 5'($urandom());
    src_sp = ss; dst_sp = ds;
    e.tag = tag; e.issued = cycle;
    q.push_back(e);
  endtask

  task automatic add_case(logic sub, rmode_e m, fp64_t x, fp64_t y, logic b2b);
    exp_t e;
    ref_t r;
    e = '0;
    r = ref_add(x, y, sub, m);
    e.res = r.res; e.exc = r.exc;
    if (b2b) issue_b2b(sub ? OP_SUB : OP_ADD, m, x, y, e);
    else     issue(sub ? OP_SUB : OP_ADD, m, x, y, e);
  endtask

  // single-precision add/subtract: operands and result in the low word
  task automatic add_case_sp(logic sub, rmode_e m, fp64_t x, fp64_t y, logic b2b);
    exp_t e;
    ref_t r;
    e = '0;
    r = ref_add(sgl_to_dbl(x[31:0]), sgl_to_dbl(y[31:0]), sub, m, 1'b1);
    e.res = r.res; e.exc = r.exc;
    if (b2b) issue_b2b(sub ? OP_SUB : OP_ADD, m, x, y, e, 1'b1, 1'b1);
    else     issue(sub ? OP_SUB : OP_ADD, m, x, y, e, 1'b1, 1'b1);
  endtask

  task automatic special_sp(fpop_e o, logic [31:0] x, logic [31:0] y, logic [31:0] res,
                            fexc_t exc);
    exp_t e;
    e = '0; e.res = {32'h0, res}; e.exc = exc;
    issue(o, RM_NEAREST, {32'h0, x}, {32'h0, y}, e, 1'b1, 1'b1);
  endtask

  task automatic special_case(fpop_e o, fp64_t x, fp64_t y, fp64_t res, fexc_t exc);
    exp_t e;
    e = '0; e.res = res; e.exc = exc;
    issue(o, RM_NEAREST, x, y, e);
  endtask

  task automatic cmp_case(fpop_e o, fp64_t x, fp64_t y, logic ss = 1'b0);
    exp_t e;
    fp64_t xr, yr;
    xr = x; yr = y;
    if (ss) begin
      x = sgl_to_dbl(xr[31:0]);
      y = sgl_to_dbl(yr[31:0]);
    end
    e = '0;
    e.fccv = 1'b1;
    if (fp_is_nan(x) || fp_is_nan(y)) begin
      e.fcc = FCC_UN;
      e.exc.nv = (o == OP_CMPE) || fp_is_snan(x) || fp_is_snan(y);
    end else e.fcc = ref_cmp(x, y);
    issue(o, RM_NEAREST, xr, yr, e, ss, 1'b0);
  endtask

  task automatic itod_case(int v);
    exp_t e;
    e = '0;
    e.res = $realtobits($itor(v));
    issue(OP_ITOF, rmode_e'($urandom_range(0, 3)), '0, {32'h0, v}, e);
  endtask

  // FiTOs: rounds when the integer needs more than 24 bits
  task automatic itos_case(int v);
    exp_t   e;
    ref_t   r;
    rmode_e m;
    longint mag;
    e = '0;
    m = rmode_e'($urandom_range(0, 3));
    mag = (v < 0) ? -longint'(v) : longint'(v);
    r = ref_round(v < 0, 128'(mag), 0, m, 1'b1);
    e.res = r.res; e.exc = r.exc;
    issue(OP_ITOF, m, '0, {32'h0, v}, e, 1'b0, 1'b1);
  endtask

  // FsTOd: exact
  task automatic stod_case(logic [31:0] y);
    exp_t  e;
    fp64_t w;
    e = '0;
    w = sgl_to_dbl(y);
    e.res = fp_is_nan(w) ? fp_nan_prop(w, w) : w;
    e.exc.nv = fp_is_snan(w);
    issue(OP_CVT, rmode_e'($urandom_range(0, 3)), '0, {32'h0, y}, e, 1'b1, 1'b0);
  endtask

  // FdTOs: rounds, may overflow or flush
  task automatic dtos_case(fp64_t y, rmode_e m);
    exp_t e;
    ref_t r;
    e = '0;
    if (fp_is_nan(y)) begin
      e.res = special_to_sgl(fp_nan_prop(y, y));
      e.exc.nv = fp_is_snan(y);
    end else if (fp_is_inf(y)) begin
      e.res = special_to_sgl(y);
    end else begin
      r = ref_round(y.sign, sig_of(y), int'(y.expo) - 1075, m, 1'b1);
      e.res = r.res; e.exc = r.exc;
    end
    issue(OP_CVT, m, '0, y, e, 1'b0, 1'b1);
  endtask

  // FMOVs, FNEGs, FABSs: sign bit only
  task automatic move_case(fpop_e o, logic [31:0] y);
    exp_t e;
    e = '0;
    e.res = {32'h0, (o == OP_MOV) ? y[31] : (o == OP_NEG) ? !y[31] : 1'b0, y[30:0]};
    issue(o, RM_NEAREST, '0, {32'($urandom()), y}, e, 1'b1, 1'b1);
  endtask

  task automatic dtoi_case(fp64_t y, logic ss = 1'b0);
    exp_t  e;
    real   rv;
    fp64_t yr;
    yr = y;
    if (ss) y = sgl_to_dbl(yr[31:0]);
    e = '0;
    rv = (y.expo == 0) ? 0.0 : $bitstoreal(y);
    if (fp_is_nan(y) || rv >= 2147483648.0 || rv <= -2147483649.0) begin
      e.exc.nv = 1'b1;
      e.res = (y.sign && !fp_is_nan(y)) ? 64'h8000_0000 : 64'h7FFF_FFFF;
    end else begin
      e.res = {32'h0, 32'($rtoi(rv))};
      e.exc.nx = ($itor($rtoi(rv)) != rv);
    end
    issue(OP_FTOI, RM_NEAREST, '0, yr, e, ss, 1'b0);
  endtask

  localparam fp64_t PINF = 64'h7FF0_0000_0000_0000;
  localparam fp64_t NINF = 64'hFFF0_0000_0000_0000;
  localparam fp64_t QNAN = 64'h7FF8_0000_0000_0001;
  localparam fp64_t SNAN = 64'h7FF0_0000_0000_0001;
  localparam fp64_t ONE  = 64'h3FF0_0000_0000_0000;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // the worked example of the design: 234 + 234 = 468 (exponent 1030 -> 1031)
    add_case(1'b0, RM_NEAREST, $realtobits(234.0), $realtobits(234.0), 1'b0);
    add_case(1'b1, RM_NEAREST, ONE, ONE, 1'b0);
    add_case(1'b1, RM_NEG_INF, ONE, ONE, 1'b0);
    add_case(1'b0, RM_NEAREST, 64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF, 1'b0);
    add_case(1'b0, RM_ZERO,    64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF, 1'b0);
    add_case(1'b1, RM_NEAREST, 64'h0011_0000_0000_0000, 64'h0010_0000_0000_0001, 1'b0);
    add_case(1'b0, RM_NEAREST, ONE, 64'h3CA0_0000_0000_0000, 1'b0);   // tie: 1 + 2^-53
    add_case(1'b0, RM_POS_INF, ONE, 64'h3CA0_0000_0000_0000, 1'b0);
    special_case(OP_ADD, PINF, NINF, QNAN_DEFAULT, 5'b10000);
    special_case(OP_SUB, PINF, PINF, QNAN_DEFAULT, 5'b10000);
    special_case(OP_ADD, PINF, ONE, PINF, 5'b00000);
    special_case(OP_SUB, ONE, PINF, NINF, 5'b00000);
    special_case(OP_ADD, QNAN, ONE, 64'h7FF8_0000_0000_0001, 5'b00000);
    special_case(OP_ADD, ONE, SNAN, 64'h7FF8_0000_0000_0001, 5'b10000);
    // random add/subtract, all rounding modes, issued back to back
    for (int i = 0; i < 4000; i++) begin
      fp64_t x, y;
      x = rand_fp(1, 2046);
      if (i % 4 == 0)      y = rand_fp(1, 2046);
      else if (i % 4 == 1) y = rand_fp(int'(x.expo) > 3 ? int'(x.expo) - 2 : 1, int'(x.expo) < 2044 ? int'(x.expo) + 2 : 2046);
      else if (i % 4 == 2) begin y = x; y.mant[7:0] = 8'($urandom()); end
      else                 y = rand_fp(int'(x.expo) > 70 ? int'(x.expo) - 70 : 1, int'(x.expo));
      add_case(1'($urandom()), rmode_e'($urandom_range(0, 3)), x, y, 1'b1);
    end
    @(posedge clk) #1 in_valid = 1'b0;
    // compares
    cmp_case(OP_CMP, ONE, ONE);
    cmp_case(OP_CMP, 64'h0, 64'h8000_0000_0000_0000);
    cmp_case(OP_CMP, ONE, QNAN);
    cmp_case(OP_CMPE, ONE, QNAN);
    cmp_case(OP_CMP, SNAN, ONE);
    cmp_case(OP_CMP, NINF, PINF);
    for (int i = 0; i < 300; i++) begin
      fp64_t x, y;
      x = rand_fp(1000, 1050);
      y = (i % 3 == 0) ? x : rand_fp(1000, 1050);
      if (i % 5 == 0) y.sign = !x.sign;
      cmp_case((i % 2 == 1) ? OP_CMPE : OP_CMP, x, y);
    end
    // conversions
    itod_case(0); itod_case(1); itod_case(-1); itod_case(32'h7FFF_FFFF); itod_case(32'h8000_0000);
    for (int i = 0; i < 300; i++) itod_case($urandom());
    dtoi_case($realtobits(2147483647.9)); dtoi_case($realtobits(-2147483648.0));
    dtoi_case($realtobits(2147483648.0)); dtoi_case($realtobits(-2147483649.0));
    dtoi_case($realtobits(-0.75)); dtoi_case(QNAN); dtoi_case(NINF); dtoi_case(64'h0);
    for (int i = 0; i < 300; i++) dtoi_case(rand_fp(1000, 1055));
    // single precision: add/subtract
    add_case_sp(1'b0, RM_NEAREST, 64'h4369_0000, 64'h4369_0000, 1'b0);  // 234 + 234
    add_case_sp(1'b0, RM_NEAREST, 64'h3F80_0000, 64'h3380_0000, 1'b0);  // tie: 1 + 2^-24
    add_case_sp(1'b0, RM_POS_INF, 64'h3F80_0000, 64'h3380_0000, 1'b0);
    add_case_sp(1'b0, RM_NEAREST, 64'h7F7F_FFFF, 64'h7F7F_FFFF, 1'b0);  // overflow
    add_case_sp(1'b1, RM_NEAREST, 64'h0110_0000, 64'h0100_0001, 1'b0);  // underflow
    add_case_sp(1'b1, RM_NEG_INF, 64'h3F80_0000, 64'h3F80_0000, 1'b0);
    special_sp(OP_ADD, 32'h7F80_0000, 32'hFF80_0000, 32'h7FFF_FFFF, 5'b10000);
    special_sp(OP_SUB, 32'h3F80_0000, 32'h7F80_0000, 32'hFF80_0000, 5'b00000);
    special_sp(OP_ADD, 32'h7FC0_0001, 32'h3F80_0000, 32'h7FC0_0001, 5'b00000);
    special_sp(OP_ADD, 32'h3F80_0000, 32'h7F80_0001, 32'h7FC0_0001, 5'b10000);
    for (int i = 0; i < 2000; i++) begin
      fp64_t x, y;
      x = rand_sp(1, 254);
      if (i % 4 == 0)      y = rand_sp(1, 254);
      else if (i % 4 == 1) y = rand_sp(int'(x[30:23]) > 3 ? int'(x[30:23]) - 2 : 1, int'(x[30:23]) < 252 ? int'(x[30:23]) + 2 : 254);
      else if (i % 4 == 2) begin y = x; y[7:0] = 8'($urandom()); end
      else                 y = rand_sp(int'(x[30:23]) > 40 ? int'(x[30:23]) - 40 : 1, int'(x[30:23]));
      if (i % 2 == 0) y[63:32] = 32'($urandom());                // upper word ignored
      add_case_sp(1'($urandom()), rmode_e'($urandom_range(0, 3)), x, y, 1'b1);
    end
    @(posedge clk) #1 in_valid = 1'b0;
    // single precision: compares and conversions
    cmp_case(OP_CMP, 64'h3F80_0000, 64'h3F80_0000, 1'b1);
    cmp_case(OP_CMPE, 64'h3F80_0000, 64'h7FC0_0000, 1'b1);
    cmp_case(OP_CMP, 64'h7F80_0001, 64'h3F80_0000, 1'b1);
    for (int i = 0; i < 300; i++) begin
      fp64_t x, y;
      x = rand_sp(100, 150);
      y = (i % 3 == 0) ? x : rand_sp(100, 150);
      if (i % 5 == 0) y[31] = !x[31];
      cmp_case((i % 2 == 1) ? OP_CMPE : OP_CMP, x, y, 1'b1);
    end
    itos_case(0); itos_case(1); itos_case(-1); itos_case(32'h7FFF_FFFF); itos_case(32'h8000_0000);
    itos_case(32'h0100_0001); itos_case(32'h0100_0003);
    for (int i = 0; i < 300; i++) itos_case($urandom());
    dtoi_case(64'h4F00_0000, 1'b1); dtoi_case(64'hCF00_0000, 1'b1); dtoi_case(64'h7FC0_0000, 1'b1);
    for (int i = 0; i < 300; i++) dtoi_case(rand_sp(110, 160), 1'b1);
    stod_case(32'h0); stod_case(32'h8000_0001); stod_case(32'h7F80_0000); stod_case(32'h7F80_0001);
    stod_case(32'hFFC0_1234);
    for (int i = 0; i < 300; i++) stod_case(32'(rand_sp(1, 254)));
    dtos_case(PINF, RM_NEAREST); dtos_case(SNAN, RM_NEAREST); dtos_case(64'h8000_0000_0000_0000, RM_ZERO);
    dtos_case(64'h47EF_FFFF_F000_0000, RM_NEAREST);   // rounds up to overflow
    dtos_case(64'h47EF_FFFF_F000_0000, RM_ZERO);
    dtos_case(64'h3810_0000_0000_0000, RM_NEAREST);   // smallest normal single
    dtos_case(64'h380F_FFFF_F000_0000, RM_NEAREST);   // rounds up to it
    dtos_case(64'h380F_FFFF_F000_0000, RM_ZERO);      // flushed
    for (int i = 0; i < 600; i++) dtos_case(rand_fp(850, 1180), rmode_e'($urandom_range(0, 3)));
    for (int i = 0; i < 100; i++) begin
      move_case(OP_MOV, $urandom()); move_case(OP_NEG, $urandom()); move_case(OP_ABS, $urandom());
    end
    repeat (10) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
