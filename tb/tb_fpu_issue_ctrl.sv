// tb_fpu_issue_ctrl: checks issue/stall decisions of the issue controller.
//
// Random streams of decoded ops (adder, multiplier, divider) with a random
// divider-ready signal. The testbench keeps its own record of which future
// cycles already have a result on the shared port and checks every cycle that
// an op issues exactly when its completion slot is free and, for a divide,
// the divider is ready. Both stall causes must occur.
module tb_fpu_issue_ctrl;
  import fpu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic dec_valid = 1'b0, div_ready = 1'b1;
  unit_e unit = UNIT_ADD;
  logic issue, stall;
  int checks = 0, failures = 0, cycle = 0, port_stalls = 0, div_stalls = 0;
  bit taken [int];

  fpu_issue_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      int lat;
      logic exp_issue, busy_slot;
      @(negedge clk);
      cycle++;
      dec_valid = ($urandom_range(0, 3) != 0);
      unit      = unit_e'($urandom_range(1, 3));
      div_ready = ($urandom_range(0, 3) != 0);
      lat       = (unit == UNIT_DIV) ? LAT_DIV : (unit == UNIT_MUL ? LAT_MUL : LAT_ADD);
      #1;
      busy_slot = taken.exists(cycle + lat);
      exp_issue = dec_valid && !busy_slot && !(unit == UNIT_DIV && !div_ready);
      if (dec_valid && busy_slot) port_stalls++;
      if (dec_valid && !busy_slot && unit == UNIT_DIV && !div_ready) div_stalls++;
      checks++;
      if (issue != exp_issue || stall != (dec_valid && !exp_issue)) begin
        failures++;
        if (failures < 20) $display("FAIL cycle %0d unit %0d issue %b exp %b", cycle, unit, issue, exp_issue);
      end
      if (exp_issue) taken[cycle + lat] = 1'b1;
    end
    checks++;
    if (port_stalls == 0 || div_stalls == 0) begin
      failures++;
      $display("FAIL stall causes not seen: port %0d div %0d", port_stalls, div_stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
