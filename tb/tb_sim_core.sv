// tb_sim_core: drives the simulated layout directly (no controller) with
// SEG_LEN = 16 and STEP_DIV = 14 and checks: motion rate (speed 7 = one step
// per 2 clocks), the segment order round the outer loop, the inner loop and
// the spur, reverse running, sensors lighting at segment middles, the spur's
// bumper, and the three violations: derailment through a switch set against
// the train, two trains in one segment, and both trains on the crossing.
// After a violation the trains must not move.
module tb_sim_core;
  import train_pkg::*;
  localparam int L = 16, MID = L / 2;
  logic clk = 0, reset = 1;
  speed_t [1:0] speed;
  train_cmd_t cmd;
  logic [4:0] sensors;
  sim_state_t disp;
  int checks = 0, failures = 0;

  sim_core #(.SEG_LEN(L), .STEP_DIV(14), .SENSOR_WIN(1)) dut (.clk, .reset, .speed, .cmd, .sensors, .disp);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_reset();
    cmd = '0; cmd.fwd = 2'b11; speed = '0;
    @(negedge clk) reset = 1;
    repeat (2) @(negedge clk);
    reset = 0;
  endtask

  // Wait until train t enters segment s (at most n clocks); report clocks.
  task automatic wait_seg(int t, seg_e s, int n, output int took);
    took = 0;
    while (disp.seg[t] != s && took < n) begin @(negedge clk); took++; end
    check(disp.seg[t] == s, $sformatf("train %0d reaches %s (now %s)", t, s.name(), disp.seg[t].name()));
  endtask

  int took;
  seg_e a_prev;
  bit saw_sensor;

  initial begin
    speed = '0; cmd = '0; cmd.fwd = 2'b11;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;

    // 1. Rate: A at speed 7 moves one position per two clocks.
    check(disp.seg[0] == SEG_OUTER_L && disp.pos[0] == 0, "A start");
    check(disp.seg[1] == SEG_INNER && disp.pos[1] == 1, "B start");
    speed[0] = 7; cmd.track[0] = 1;
    repeat (16) @(negedge clk);
    check(disp.pos[0] == 8, $sformatf("A at pos %0d after 16 clocks, expected 8", disp.pos[0]));
    check(sensors[SEG_OUTER_L] == 1, "OUTER_L sensor at middle");
    check(disp.pos[1] == 1, "B unpowered stays");

    // 2. Outer loop, forward: OUTER_L -> OUTER_R -> BOTTOM -> OUTER_L.
    speed[0] = 14;
    wait_seg(0, SEG_OUTER_R, 40, took);
    check(took == L - 8, $sformatf("OUTER_R after %0d clocks", took));
    wait_seg(0, SEG_BOTTOM, 40, took);
    check(took == L, $sformatf("segment takes %0d clocks at full speed", took));
    saw_sensor = 0;
    for (int i = 0; i < L; i++) begin @(negedge clk); if (sensors[SEG_BOTTOM]) saw_sensor = 1; end
    check(saw_sensor, "BOTTOM sensor seen");
    wait_seg(0, SEG_OUTER_L, 40, took);
    check(disp.pos[0] == 0, "entered OUTER_L at end 0");
    check(disp.viol == VIOL_NONE, "no violation on the outer loop");

    // 3. Reverse: back through BL into BOTTOM, then BR to OUTER_R.
    cmd.fwd[0] = 0;
    wait_seg(0, SEG_BOTTOM, 40, took);
    check(disp.pos[0] == L - 1, "entered BOTTOM at end 1");
    wait_seg(0, SEG_OUTER_R, 40, took);
    check(disp.pos[0] == L - 1, "entered OUTER_R at end 1");
    cmd.track[0] = 0;
    check(disp.viol == VIOL_NONE, "no violation in reverse");

    // 4. Inner loop for B: INNER -> BOTTOM -> INNER with both bottom switches inside.
    do_reset();
    cmd.sw[SW_BL] = 1; cmd.sw[SW_BR] = 1;
    speed[1] = 14; cmd.track[1] = 1;
    wait_seg(1, SEG_BOTTOM, 40, took);
    check(disp.pos[1] == 0, "B entered BOTTOM at end 0");
    wait_seg(1, SEG_INNER, 40, took);
    check(disp.pos[1] == 0 && disp.viol == VIOL_NONE, "B back on INNER at end 0");

    // 5. Derailment: A runs into BR's outside leg with BR set inside.
    do_reset();
    cmd.sw[SW_BR] = 1;
    speed[0] = 14; cmd.track[0] = 1;
    wait_seg(0, SEG_OUTER_R, 40, took);
    repeat (L + 3) @(negedge clk);
    check(disp.viol == VIOL_DERAIL && disp.viol_seg == SEG_OUTER_R, "derail at BR reported");
    check(disp.seg[0] == SEG_OUTER_R && disp.pos[0] == L - 1, "A stopped at the switch");
    repeat (40) @(negedge clk);
    check(disp.seg[0] == SEG_OUTER_R && disp.pos[0] == L - 1, "frozen after derail");

    // 6. Collision: B leaves the inner loop onto OUTER_L, where A stands.
    do_reset();
    cmd.sw[SW_BR] = 1; cmd.sw[SW_BL] = 0;
    speed[1] = 14; cmd.track[1] = 1;
    wait_seg(1, SEG_OUTER_L, 80, took);
    @(negedge clk);
    check(disp.viol == VIOL_COLLISION && disp.viol_seg == SEG_OUTER_L, "collision on OUTER_L");
    begin
      logic [7:0] p; p = disp.pos[1];
      repeat (20) @(negedge clk);
      check(disp.pos[1] == p, "frozen after collision");
    end

    // 7. Spur: A turns into the spur, stops at the bumper, backs out.
    do_reset();
    cmd.sw[SW_TOP] = 1;
    speed[0] = 14; cmd.track[0] = 1;
    wait_seg(0, SEG_SPUR, 40, took);
    repeat (2 * L) @(negedge clk);
    check(disp.pos[0] == L - 1 && disp.viol == VIOL_NONE, "stopped at bumper, no violation");
    cmd.fwd[0] = 0;
    wait_seg(0, SEG_OUTER_L, 40, took);
    check(disp.pos[0] == L - 1 && disp.viol == VIOL_NONE, "backed out of the spur");

    // 8. Crossing: A parks at the middle of the spur, B runs into the crossing.
    do_reset();
    cmd.sw[SW_TOP] = 1;
    speed[0] = 14; cmd.track[0] = 1;
    wait_seg(0, SEG_SPUR, 40, took);
    while (disp.pos[0] != MID) @(negedge clk);
    cmd.track[0] = 0;
    check(sensors[SEG_SPUR] == 1, "spur sensor under parked A");
    speed[1] = 14; cmd.track[1] = 1;
    repeat (L) @(negedge clk);
    check(disp.viol == VIOL_COLLISION && disp.viol_seg == SEG_INNER, "collision on the crossing");
    check(disp.pos[1] >= MID - 1 && disp.pos[1] <= MID + 1, "B stopped at the crossing");

    // 9. Display echoes the switch settings.
    check(disp.sw == cmd.sw, "switch settings passed to display");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
