// tb_train_lab_top: end-to-end run of both configurations in the top at a
// 1 MHz clock with 16-position segments.
//
// Simulator side: the trains run with one fast and one slow, so the
// controller must stop each of them at least once and swing the bottom
// route; afterwards the controller's switch outputs are overridden to set
// the bottom-right switch against train A, which must be caught as a
// derailment, freeze the trains and make the VGA picture blink.
// Track side: sensor lines are played as passing trains, the rails are
// decoded with the DCC decoder model, and stop/go packets, 100 ms coil
// pulses, glitch rejection and a speed change are checked. Every mechanism
// is counted and one that never happened counts as a failure.
module tb_train_lab_top;
  import train_pkg::*;
  logic clk = 0, reset = 1;
  logic [1:0][3:0] sim_speed, trk_speed;
  logic vga_hsync, vga_vsync, sim_violation, hb_dir, hb_pwm, hb_brake;
  logic [3:0] vga_r, vga_g, vga_b;
  logic [4:0] sim_sensors, trk_sensors_in = '0;
  logic [2:0] trk_sw_inside, trk_sw_outside;
  int checks = 0, failures = 0;

  train_lab_top #(.CLK_HZ(1_000_000), .SEG_LEN(16), .STEP_DIV(14), .PULSE_MS(100)) dut (
    .clk, .reset, .sim_speed, .vga_hsync, .vga_vsync, .vga_r, .vga_g, .vga_b,
    .sim_violation, .sim_sensors, .trk_speed, .trk_sensors_in, .trk_sw_inside,
    .trk_sw_outside, .hb_dir, .hb_pwm, .hb_brake);

  logic valid, ok;
  logic [7:0] b0, b1, b2;
  int nbytes, ferr, mn1, mx1, mn0, mx0;
  dcc_rx_model #(.THRESH(80)) rx (.clk, .dir(hb_dir), .valid, .ok, .b0, .b1, .b2,
    .nbytes, .frame_errors(ferr), .min_half1(mn1), .max_half1(mx1), .min_half0(mn0), .max_half0(mx0));

  always #5 clk = ~clk;

  initial begin
    #(10 * 25_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok_, string what);
    checks++;
    if (!ok_) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Mechanism counters.
  int m_wait_a = 0, m_wait_b = 0, m_route = 0, m_derail = 0, m_flash = 0, m_freeze = 0;
  int m_pkt = 0, m_stop_pkt = 0, m_coil_in = 0, m_coil_out = 0, m_glitch = 0, m_speed = 0;

  // Simulator observation.
  logic wa = 0, wb = 0, rt = 0, ci = 0, co = 0;
  always @(posedge clk) if (!reset) begin
    if (dut.u_sim.a_waiting && !wa) m_wait_a++;
    if (dut.u_sim.b_waiting && !wb) m_wait_b++;
    if (dut.u_sim.cmd.sw[SW_BL] != rt) m_route++;
    wa <= dut.u_sim.a_waiting; wb <= dut.u_sim.b_waiting; rt <= dut.u_sim.cmd.sw[SW_BL];
    if (trk_sw_inside[SW_BL] && !ci) m_coil_in++;
    if (trk_sw_outside[SW_BL] && !co) m_coil_out++;
    ci <= trk_sw_inside[SW_BL]; co <= trk_sw_outside[SW_BL];
  end

  // Rails observation.
  logic [7:0] instr_of [8];
  int cnt_of [8];
  int bad = 0;
  always @(posedge clk) if (valid) begin
    m_pkt++;
    if (!ok || nbytes != 3 || b0 > 7) bad++;
    else begin
      instr_of[b0] <= b1; cnt_of[b0] <= cnt_of[b0] + 1;
      if (b1[3:0] == 4'd0) m_stop_pkt++;
    end
  end

  task automatic wait_pkts(int n);
    int a3, a4;
    a3 = cnt_of[3]; a4 = cnt_of[4];
    while (cnt_of[3] < a3 + n || cnt_of[4] < a4 + n) @(negedge clk);
  endtask

  task automatic train_passes(int s);
    @(negedge clk) trk_sensors_in[s] = 1;
    repeat (3000) @(negedge clk);
    trk_sensors_in[s] = 0;
    repeat (1500) @(negedge clk);
  endtask

  task automatic pixel(int px, int py, output logic [11:0] c);
    @(negedge clk);
    while (!(dut.u_sim.u_vga.x == 10'(px) && dut.u_sim.u_vga.y == 10'(py))) @(negedge clk);
    @(negedge clk);
    c = {vga_r, vga_g, vga_b};
  endtask

  initial begin
    logic [11:0] c;
    logic [7:0] frozen_pos;
    int dark, lit;
    for (int i = 0; i < 8; i++) begin instr_of[i] = 0; cnt_of[i] = 0; end
    sim_speed[0] = 4'd14; sim_speed[1] = 4'd3;
    trk_speed[0] = 4'd7;  trk_speed[1] = 4'd2;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;

    // Track side, while the simulator runs on its own.
    wait_pkts(2);
    check(instr_of[3] == 8'h68 && instr_of[4] == 8'h63, $sformatf("start packets %h %h", instr_of[3], instr_of[4]));
    train_passes(SEG_INNER);                       // B takes the bottom
    @(negedge clk) trk_sensors_in[SEG_OUTER_L] = 1; // 0.3 ms glitch
    repeat (300) @(negedge clk);
    trk_sensors_in[SEG_OUTER_L] = 0;
    repeat (2000) @(negedge clk);
    if (dut.u_trk.cmd.track == 2'b11 && dut.u_trk.u_ctrl.owner_o == 2'd2) m_glitch++;
    train_passes(SEG_OUTER_R);                     // A must stop
    wait_pkts(2);
    check(instr_of[3] == 8'h60, $sformatf("A stopped on the rails: %h", instr_of[3]));
    train_passes(SEG_INNER);                       // hand-over to A
    wait_pkts(2);
    check(instr_of[3] == 8'h68 && instr_of[4] == 8'h60, $sformatf("hand-over packets %h %h", instr_of[3], instr_of[4]));
    trk_speed[0] = 4'd12;
    wait_pkts(2);
    if (instr_of[3] == 8'h6D) m_speed++;
    check(bad == 0 && ferr == 0, $sformatf("bad packets %0d, framing errors %0d", bad, ferr));
    check(mn1 == 58 && mx1 == 58 && mn0 == 100 && mx0 == 100, $sformatf("DCC half periods %0d %0d %0d %0d", mn1, mx1, mn0, mx0));
    // Let the coil pulses finish.
    repeat (110_000) @(negedge clk);

    // Simulator: normal running must have been safe.
    check(!sim_violation, "no violation under the controller");

    // Override the controller's switches: BR set inside in front of train A.
    wait (dut.u_sim.state.seg[0] == SEG_OUTER_L);
    force dut.u_sim.u_core.cmd = '{track: 2'b01, fwd: 2'b11, sw: 3'b100};
    wait (sim_violation);
    @(negedge clk);
    if (dut.u_sim.state.viol == VIOL_DERAIL && dut.u_sim.state.viol_seg == SEG_OUTER_R) m_derail++;
    frozen_pos = dut.u_sim.state.pos[0];
    repeat (1000) @(negedge clk);
    if (dut.u_sim.state.pos[0] == frozen_pos) m_freeze++;
    dark = 0; lit = 0;
    for (int f = 0; f < 34; f++) begin
      pixel(588, 200, c);
      if (c == 12'h000) dark++; else lit++;
    end
    if (dark > 0 && lit > 0) m_flash++;
    release dut.u_sim.u_core.cmd;

    $display("mechanisms: waitA=%0d waitB=%0d route=%0d derail=%0d freeze=%0d flash=%0d pkt=%0d stop=%0d coil_in=%0d coil_out=%0d glitch=%0d speed=%0d",
             m_wait_a, m_wait_b, m_route, m_derail, m_freeze, m_flash, m_pkt, m_stop_pkt, m_coil_in, m_coil_out, m_glitch, m_speed);
    check(m_wait_a > 0, "train A stopped by the controller");
    check(m_wait_b > 0, "train B stopped by the controller");
    check(m_route > 0, "bottom route switched");
    check(m_derail > 0, "derailment detected");
    check(m_freeze > 0, "trains frozen after violation");
    check(m_flash > 0, "display blinks at the violation");
    check(m_pkt > 0, "DCC packets on the rails");
    check(m_stop_pkt > 0, "stop packets");
    check(m_coil_in > 0, "inside coil pulse");
    check(m_coil_out > 0, "outside coil pulse");
    check(m_glitch > 0, "sensor glitch rejected");
    check(m_speed > 0, "speed change reached the rails");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
