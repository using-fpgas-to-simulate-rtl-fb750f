// tb_train_sim_system: runs the simulator configuration (example controller
// + simulated layout + VGA) with short segments, first with A fast and B
// slow, then the other way round. Both trains must keep lapping their loops
// with no violation; each train must be made to wait at least once, and a
// waiting train must not move; the route switches must change; the VGA
// syncs must run. A counter-clockwise copy runs alongside and must be just
// as safe and make progress.
module tb_train_sim_system;
  import train_pkg::*;
  logic clk = 0, reset = 1;
  speed_t [1:0] speed;
  logic hsync, vsync, violation, a_waiting, b_waiting;
  logic [3:0] r, g, b;
  logic [4:0] sensors;
  train_cmd_t cmd;
  sim_state_t state;
  int checks = 0, failures = 0;

  train_sim_system #(.SEG_LEN(16), .STEP_DIV(14), .SENSOR_WIN(1)) dut (
    .clk, .reset, .speed, .hsync, .vsync, .r, .g, .b, .violation, .sensors, .cmd,
    .state, .a_waiting, .b_waiting);

  // Counter-clockwise variant running side by side with the same speeds.
  logic hs2, vs2, viol2, aw2, bw2;
  logic [3:0] r2, g2, b2;
  logic [4:0] sens2;
  train_cmd_t cmd2;
  sim_state_t st2;
  train_sim_system #(.SEG_LEN(16), .STEP_DIV(14), .SENSOR_WIN(1), .CLOCKWISE(1'b0)) dut_ccw (
    .clk, .reset, .speed, .hsync(hs2), .vsync(vs2), .r(r2), .g(g2), .b(b2), .violation(viol2),
    .sensors(sens2), .cmd(cmd2), .state(st2), .a_waiting(aw2), .b_waiting(bw2));

  int laps2_a = 0, laps2_b = 0, waits2_a = 0, waits2_b = 0;
  seg_e sa2 = SEG_OUTER_L, sb2 = SEG_INNER;
  logic wa2 = 0, wb2 = 0;
  always @(posedge clk) if (!reset) begin
    if (st2.seg[0] == SEG_OUTER_L && sa2 != SEG_OUTER_L) laps2_a++;
    if (st2.seg[1] == SEG_INNER && sb2 != SEG_INNER) laps2_b++;
    if (aw2 && !wa2) waits2_a++;
    if (bw2 && !wb2) waits2_b++;
    sa2 <= st2.seg[0]; sb2 <= st2.seg[1]; wa2 <= aw2; wb2 <= bw2;
  end

  always #5 clk = ~clk;

  initial begin
    #(10 * 200_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int laps_a = 0, laps_b = 0, waits_a = 0, waits_b = 0, route_changes = 0, hs_edges = 0;
  int moved_while_waiting = 0;
  seg_e sa = SEG_OUTER_L, sb = SEG_INNER;
  logic wa = 0, wb = 0, rt = 0, hs = 1;
  logic [7:0] pa = 0, pb = 0;
  always @(posedge clk) if (!reset) begin
    if (state.seg[0] == SEG_OUTER_L && sa != SEG_OUTER_L) laps_a++;
    if (state.seg[1] == SEG_INNER && sb != SEG_INNER) laps_b++;
    if (a_waiting && !wa) waits_a++;
    if (b_waiting && !wb) waits_b++;
    if (wa && a_waiting && state.pos[0] != pa) moved_while_waiting++;
    if (wb && b_waiting && state.pos[1] != pb) moved_while_waiting++;
    if (cmd.sw[SW_BL] != rt) route_changes++;
    if (hsync != hs) hs_edges++;
    sa <= state.seg[0]; sb <= state.seg[1]; wa <= a_waiting; wb <= b_waiting;
    pa <= state.pos[0]; pb <= state.pos[1]; rt <= cmd.sw[SW_BL]; hs <= hsync;
  end

  int la1, lb1;
  initial begin
    speed[0] = 4'd14; speed[1] = 4'd4;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    repeat (60_000) @(negedge clk);
    check(!violation, "no violation with A fast");
    check(laps_a >= 5 && laps_b >= 2, $sformatf("laps A=%0d B=%0d", laps_a, laps_b));
    // The fast train laps at least as often as the slow one, which it waits for.
    check(laps_a >= laps_b, $sformatf("fast A %0d laps, slow B %0d laps", laps_a, laps_b));
    la1 = laps_a; lb1 = laps_b;
    speed[0] = 4'd3; speed[1] = 4'd14;
    repeat (60_000) @(negedge clk);
    check(!violation, "no violation with B fast");
    check(laps_b >= 10, $sformatf("laps B=%0d", laps_b));
    check(laps_b - lb1 >= laps_a - la1, $sformatf("fast B %0d laps, slow A %0d laps", laps_b - lb1, laps_a - la1));
    check(waits_a >= 1, $sformatf("A waited %0d times", waits_a));
    check(waits_b >= 1, $sformatf("B waited %0d times", waits_b));
    check(moved_while_waiting == 0, "waiting trains stand still");
    check(route_changes >= 2, $sformatf("route changes %0d", route_changes));
    check(hs_edges > 200, "VGA running");
    check(!viol2, "no violation counter-clockwise");
    check(cmd2.fwd == 2'b00, "counter-clockwise runs in reverse");
    check(laps2_a >= 5 && laps2_b >= 5, $sformatf("ccw laps A=%0d B=%0d", laps2_a, laps2_b));
    check(waits2_a >= 1 && waits2_b >= 1, $sformatf("ccw waits A=%0d B=%0d", waits2_a, waits2_b));
    $display("laps A=%0d B=%0d waits A=%0d B=%0d route changes=%0d", laps_a, laps_b, waits_a, waits_b, route_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
