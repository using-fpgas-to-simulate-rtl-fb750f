// tb_switch_pulser: drives switch changes and measures the coil pulses.
// With CLK_HZ = 10 kHz and PULSE_MS = 100 a pulse must last exactly 1000
// clocks, go to the inside coil on a rising edge and the outside coil on a
// falling edge, only for the switch that changed, and a change during a
// pulse must cut it short and start the other coil.
module tb_switch_pulser;
  localparam int CLK_HZ = 10_000, PMS = 100, LEN = CLK_HZ * PMS / 1000;
  logic clk = 0, reset = 1;
  logic [2:0] sw = '0, sw_inside, sw_outside;
  int checks = 0, failures = 0;

  switch_pulser #(.CLK_HZ(CLK_HZ), .PULSE_MS(PMS), .NUM_SW(3)) dut (.clk, .reset, .sw, .sw_inside, .sw_outside);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Count the clocks for which `sig` is high, starting at the next edge.
  task automatic measure(input int which, input bit ins, output int n);
    n = 0;
    @(posedge clk); #1;
    while ((ins ? sw_inside[which] : sw_outside[which]) && n < 5 * LEN) begin
      n++; @(posedge clk); #1;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    repeat (5) @(negedge clk);
    check(sw_inside == 0 && sw_outside == 0, "no pulse without change");

    // Rising edge on switch 1: inside coil of switch 1 only.
    sw[1] = 1;
    fork
      measure(1, 1'b1, n);
      begin @(posedge clk); #1;
        check(sw_inside == 3'b010 && sw_outside == 0, "only inside coil 1"); end
    join
    check(n == LEN, $sformatf("inside pulse %0d clocks, expected %0d", n, LEN));

    // Falling edge on switch 1: outside coil.
    @(negedge clk) sw[1] = 0;
    measure(1, 1'b0, n);
    check(n == LEN, $sformatf("outside pulse %0d clocks", n));
    check(sw_inside == 0, "inside coil idle");

    // Holding a level gives no new pulse.
    repeat (2 * LEN) @(negedge clk);
    check(sw_inside == 0 && sw_outside == 0, "no repeat pulse");

    // Change during a pulse: the running pulse ends, the other coil fires.
    sw[2] = 1;
    repeat (LEN / 4) @(negedge clk);
    check(sw_inside[2] == 1, "switch 2 inside pulse running");
    sw[2] = 0;
    @(negedge clk);
    check(sw_inside[2] == 0 && sw_outside[2] == 1, "pulse replaced by outside pulse");
    n = 1;
    while (sw_outside[2] && n < 5 * LEN) begin @(negedge clk); n++; end
    check(n - 1 == LEN, $sformatf("replacement pulse %0d clocks", n - 1));

    // Two switches at once.
    sw = 3'b101;
    @(negedge clk); @(negedge clk);
    check(sw_inside == 3'b101, "switches 0 and 2 inside together");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
