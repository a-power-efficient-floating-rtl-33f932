// tb_clock_gate: checks the latch-based clock gate.
//
// The enable changes at random moments, in the low and in the high phase of
// the clock. Every rising edge of gclk must coincide with a rising edge of
// clk at which the enable was high, every falling edge with a falling edge of
// clk (full-width pulses, no glitches), and every clk edge with the enable
// high must produce a gclk edge.
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0, expected = 0, seen = 0;
  realtime t_rise, t_fall;

  clock_gate dut (.*);

  initial begin
    forever begin
      #10 clk = 1'b1;
      t_rise = $realtime;
      #10 clk = 1'b0;
      t_fall = $realtime;
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (en) expected++;

  always @(posedge gclk) begin
    seen++;
    checks++;
    if ($realtime != t_rise || !clk) begin
      failures++;
      $display("FAIL gclk rose at %0t without a clk edge", $realtime);
    end
  end

  always @(negedge gclk) begin
    checks++;
    if ($realtime != t_fall) begin
      failures++;
      $display("FAIL gclk fell at %0t (short pulse)", $realtime);
    end
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      #($urandom_range(1, 19));
      // keep away from the clk edges themselves
      if ((int'($realtime) % 10) == 0) #1;
      en = 1'($urandom());
    end
    @(negedge clk);
    checks++;
    if (seen != expected || seen == 0) begin
      failures++;
      $display("FAIL gated edges %0d expected %0d", seen, expected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
