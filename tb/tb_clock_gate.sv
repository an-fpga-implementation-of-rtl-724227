// tb_clock_gate: the gated clock must carry exactly the clock pulses whose
// preceding falling edge saw en high, each as wide as the clock's high
// phase (no glitches), and none while en is low.  en is changed at random
// times, including while the clock is high.
module tb_clock_gate;
  timeunit 1ns; timeprecision 100ps;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0, pulses = 0, expected = 0, gated = 0;
  realtime rise_t;
  logic en_at_fall = 0;

  clock_gate dut (.*);
  always #5 clk = ~clk;

  // expected pulses: one per rising edge whose preceding falling edge saw en
  always @(negedge clk) en_at_fall <= en;
  always @(posedge clk) begin
    if (en_at_fall) expected++;
    else gated++;
  end
  always @(posedge gclk) begin
    pulses++;
    rise_t = $realtime;
    checks++;
    if (!clk) failures++;
  end
  // (the settling of the output at time zero is not a pulse)
  always @(negedge gclk) if ($realtime > 0) begin
    checks++;
    if ($realtime - rise_t != 5.0) begin
      failures++;
      $display("FAIL gated pulse width %0t at %0t", $realtime - rise_t, $realtime);
    end
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      #(1 + $urandom % 23);
      en = 1'($urandom);
    end
    @(negedge clk);
    checks++;
    if (pulses != expected || gated == 0) begin
      failures++;
      $display("FAIL %0d gated pulses, %0d expected", pulses, expected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
