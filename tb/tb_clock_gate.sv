// tb_clock_gate: toggles the enable at random times, also while the clock
// is high, and checks that the gated clock is high only during clock-high
// phases whose enable was sampled in the preceding low phase, so it never
// produces a partial pulse.
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int pulses = 0, exp_pulses = 0;
  logic en_at_low;

  clock_gate dut (.clk, .en, .gclk);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always #10 clk = ~clk;

  // enable changes at arbitrary points
  // enable changes at arbitrary points, never on a clock edge
  initial forever begin
    int d;
    d = 3 + int'($urandom % 17);
    if ((int'($time) + d) % 10 == 0) d++;
    #(d);
    en = 1'($urandom);
  end

  // the gate passes a pulse when en was high at the end of the low phase
  always @(en or clk) if (!clk) en_at_low = en;
  always @(posedge clk) if (en_at_low) exp_pulses++;
  always @(posedge gclk) pulses++;

  initial begin
    en_at_low = 0;
    repeat (2000) begin
      #1;
      checks++;
      if (gclk && !clk) begin failures++; $display("FAIL gclk high while clk low"); end
      #(1 + $urandom % 5);
    end
    checks += 2;
    if (pulses == 0) failures++;
    if (pulses != exp_pulses) begin failures++; $display("FAIL pulses %0d exp %0d", pulses, exp_pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
