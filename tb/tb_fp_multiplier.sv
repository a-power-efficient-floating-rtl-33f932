// tb_fp_multiplier: self-checking test of the multiplier pipeline.
//
// Issues one multiply per cycle and checks each product against the exact
// integer product rounded by tb_fp_ref_pkg: random operands in all four
// rounding modes, products near overflow and underflow, significands of all
// ones (longest carry chains) and special operands; then FMULs and FsMULd
// on single operands. Each result must arrive
// exactly LAT_MUL cycles after issue, in order, with its tag.
module tb_fp_multiplier;
  import fpu_pkg::*;
  import tb_fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic src_sp = 1'b0, dst_sp = 1'b0;
  rmode_e rm = RM_NEAREST;
  logic [TAG_W-1:0] tag = '0;
  fp64_t a = '0, b = '0;
  logic out_valid, busy;
  logic [TAG_W-1:0] out_tag;
  fp64_t out_result;
  fexc_t out_exc;
  int checks = 0, failures = 0, cycle = 0;

  typedef struct packed {
    fp64_t res; fexc_t exc; logic [TAG_W-1:0] tag; int issued;
  } exp_t;
  exp_t q[$];

  fp_multiplier dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL unexpected result");
    end else begin
      e = q.pop_front();
      if (out_tag != e.tag || out_exc != e.exc || out_result != e.res || cycle - e.issued != LAT_MUL) begin
        failures++;
        if (failures < 20)
          $display("FAIL res=%h exp=%h exc=%b exp=%b lat=%0d", out_result, e.res, out_exc, e.exc, cycle - e.issued);
      end
    end
  end

  task automatic issue(rmode_e m, fp64_t x, fp64_t y, fp64_t res, fexc_t exc,
                        logic ss = 1'b0, logic ds = 1'b0);
    exp_t e;
    @(posedge clk);
    #1;
    in_valid = 1'b1; rm = m; a = x; b = y; tag = 5'($urandom());
    src_sp = ss; dst_sp = ds;
    e.res = res; e.exc = exc; e.tag = tag; e.issued = cycle;
    q.push_back(e);
  endtask

  task automatic mul_case(rmode_e m, fp64_t x, fp64_t y);
    ref_t r;
    r = ref_mul(x, y, m);
    issue(m, x, y, r.res, r.exc);
  endtask

  // FMULs (ds = 1) or FsMULd (ds = 0) of singles in the low word
  task automatic mul_case_sp(rmode_e m, fp64_t x, fp64_t y, logic ds);
    ref_t r;
    r = ref_mul(sgl_to_dbl(x[31:0]), sgl_to_dbl(y[31:0]), m, ds);
    issue(m, x, y, r.res, r.exc, 1'b1, ds);
  endtask

  localparam fp64_t PINF = 64'h7FF0_0000_0000_0000;
  localparam fp64_t QNAN = 64'h7FF8_0000_0000_0001;
  localparam fp64_t SNAN = 64'hFFF0_0000_0000_0001;
  localparam fp64_t ONE  = 64'h3FF0_0000_0000_0000;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    mul_case(RM_NEAREST, $realtobits(234.0), $realtobits(2.0));
    mul_case(RM_NEAREST, 64'h3FFF_FFFF_FFFF_FFFF, 64'h3FFF_FFFF_FFFF_FFFF);
    for (int m = 0; m < 4; m++) begin
      mul_case(rmode_e'(m), 64'h3FFF_FFFF_FFFF_FFFF, 64'hBFFF_FFFF_FFFF_FFFF);
      mul_case(rmode_e'(m), 64'h7FE0_0000_0000_0001, 64'h4000_0000_0000_0000);   // overflow
      mul_case(rmode_e'(m), 64'h0010_0000_0000_0001, 64'h3FE0_0000_0000_0000);   // underflow
    end
    issue(RM_NEAREST, PINF, 64'h0, QNAN_DEFAULT, 5'b10000);
    issue(RM_NEAREST, PINF, 64'hBFF0_0000_0000_0000, 64'hFFF0_0000_0000_0000, 5'b00000);
    issue(RM_NEAREST, QNAN, ONE, QNAN, 5'b00000);
    issue(RM_NEAREST, ONE, SNAN, 64'hFFF8_0000_0000_0001, 5'b10000);
    issue(RM_NEAREST, 64'h8000_0000_0000_0000, ONE, 64'h8000_0000_0000_0000, 5'b00000);
    issue(RM_NEAREST, 64'h0000_0000_0000_0001, ONE, 64'h0, 5'b00000);           // subnormal read as zero
    for (int i = 0; i < 5000; i++)
      mul_case(rmode_e'($urandom_range(0, 3)), rand_fp(1, 2046), rand_fp(1, 2046));
    for (int i = 0; i < 2000; i++)
      mul_case(rmode_e'($urandom_range(0, 3)), rand_fp(900, 1150), rand_fp(900, 1150));
    // single precision: FMULs and FsMULd
    mul_case_sp(RM_NEAREST, 64'h4369_0000, 64'h4000_0000, 1'b1);
    for (int m = 0; m < 4; m++) begin
      mul_case_sp(rmode_e'(m), 64'h3FFF_FFFF, 64'hBFFF_FFFF, 1'b1);
      mul_case_sp(rmode_e'(m), 64'h7F00_0001, 64'h4000_0000, 1'b1);      // overflow
      mul_case_sp(rmode_e'(m), 64'h0080_0001, 64'h3F00_0000, 1'b1);      // underflow
      mul_case_sp(rmode_e'(m), 64'h7F7F_FFFF, 64'h7F7F_FFFF, 1'b0);      // exact in double
    end
    issue(RM_NEAREST, 64'h7F80_0000, 64'h0, 64'h7FFF_FFFF, 5'b10000, 1'b1, 1'b1);
    issue(RM_NEAREST, 64'h3F80_0000, 64'hFF80_0001, 64'hFFC0_0001, 5'b10000, 1'b1, 1'b1);
    issue(RM_NEAREST, 64'h7F80_0000, 64'hBF80_0000, 64'hFFF0_0000_0000_0000, 5'b00000, 1'b1, 1'b0);
    for (int i = 0; i < 3000; i++)
      mul_case_sp(rmode_e'($urandom_range(0, 3)), rand_sp(1, 254), rand_sp(1, 254), 1'($urandom()));
    for (int i = 0; i < 2000; i++)
      mul_case_sp(rmode_e'($urandom_range(0, 3)), rand_sp(60, 190), rand_sp(60, 190), 1'b1);
    @(posedge clk) #1 in_valid = 1'b0;
    repeat (10) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
