// tb_train_lab_full: one complete operation of the top at its default
// parameters (25 MHz clock, 64-position segments, 100 ms coil pulses).
// Track side: both locomotives' DCC packets are decoded from the rails with
// 58 us / 100 us half periods (1450 / 2500 clocks); a train passing the
// INNER sensor sets the bottom route inside and each bottom switch gets one
// inside-coil pulse of exactly 100 ms (2 500 000 clocks). Simulator side:
// train A at full speed advances one position every STEP_DIV / 14 clocks,
// and the VGA lines and frames have the 640x480 periods.
module tb_train_lab_full;
  import train_pkg::*;
  logic clk = 0, reset = 1;
  logic [1:0][3:0] sim_speed, trk_speed;
  logic vga_hsync, vga_vsync, sim_violation, hb_dir, hb_pwm, hb_brake;
  logic [3:0] vga_r, vga_g, vga_b;
  logic [4:0] sim_sensors, trk_sensors_in = '0;
  logic [2:0] trk_sw_inside, trk_sw_outside;
  int checks = 0, failures = 0;

  train_lab_top dut (
    .clk, .reset, .sim_speed, .vga_hsync, .vga_vsync, .vga_r, .vga_g, .vga_b,
    .sim_violation, .sim_sensors, .trk_speed, .trk_sensors_in, .trk_sw_inside,
    .trk_sw_outside, .hb_dir, .hb_pwm, .hb_brake);

  logic valid, ok;
  logic [7:0] b0, b1, b2;
  int nbytes, ferr, mn1, mx1, mn0, mx0;
  dcc_rx_model #(.THRESH(2000)) rx (.clk, .dir(hb_dir), .valid, .ok, .b0, .b1, .b2,
    .nbytes, .frame_errors(ferr), .min_half1(mn1), .max_half1(mx1), .min_half0(mn0), .max_half0(mx0));

  always #20 clk = ~clk;  // 25 MHz

  initial begin
    #(40 * 5_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok_, string what);
    checks++;
    if (!ok_) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] instr_of [8];
  int cnt_of [8];
  int bad = 0;
  always @(posedge clk) if (valid) begin
    if (!ok || nbytes != 3 || b0 > 7) bad++;
    else begin instr_of[b0] <= b1; cnt_of[b0] <= cnt_of[b0] + 1; end
  end

  int cyc = 0, hs_fall = 0, hs_period = 0, vs_fall = 0, vs_period = 0;
  logic hs_d = 1, vs_d = 1;
  always @(posedge clk) begin
    cyc++;
    if (hs_d && !vga_hsync) begin if (hs_fall) hs_period = cyc - hs_fall; hs_fall = cyc; end
    if (vs_d && !vga_vsync) begin if (vs_fall) vs_period = cyc - vs_fall; vs_fall = cyc; end
    hs_d <= vga_hsync; vs_d <= vga_vsync;
  end

  int n_bl = 0, n_br = 0, t0;
  always @(posedge clk) begin
    if (!reset && trk_sw_inside[SW_BL]) n_bl++;
    if (!reset && trk_sw_inside[SW_BR]) n_br++;
  end

  initial begin
    sim_speed[0] = 4'd14; sim_speed[1] = 4'd0;
    trk_speed[0] = 4'd10; trk_speed[1] = 4'd3;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    t0 = cyc;

    // Two packets per locomotive (the first one after reset may be the reset command).
    while (cnt_of[3] < 2 || cnt_of[4] < 2) @(negedge clk);
    check(instr_of[3] == 8'h6B, $sformatf("train 3 packet %h, expected 6B", instr_of[3]));
    check(instr_of[4] == 8'h64, $sformatf("train 4 packet %h, expected 64", instr_of[4]));
    check(bad == 0 && ferr == 0, "packets well formed");
    check(mn1 == 1450 && mx1 == 1450, $sformatf("1 half %0d..%0d clocks", mn1, mx1));
    check(mn0 == 2500 && mx0 == 2500, $sformatf("0 half %0d..%0d clocks", mn0, mx0));

    // Train passes INNER (3 ms): route inside, one 100 ms pulse per bottom switch.
    @(negedge clk) trk_sensors_in[SEG_INNER] = 1;
    repeat (75_000) @(negedge clk);
    trk_sensors_in[SEG_INNER] = 0;
    repeat (2_600_000) @(negedge clk);
    check(n_bl == 2_500_000 && n_br == 2_500_000, $sformatf("coil pulses %0d %0d clocks", n_bl, n_br));
    check(trk_sw_outside == 0 && trk_sw_inside == 0, "coils idle afterwards");

    // Simulator: A moved floor(cycles * 14 / 5e6) positions.
    begin
      int expect_pos;
      expect_pos = ((cyc - t0) * 14) / 5_000_000;
      check(dut.u_sim.state.seg[0] == SEG_OUTER_L, "A still on OUTER_L");
      check(int'(dut.u_sim.state.pos[0]) >= expect_pos - 1 && int'(dut.u_sim.state.pos[0]) <= expect_pos,
            $sformatf("A at %0d, expected %0d", dut.u_sim.state.pos[0], expect_pos));
    end
    check(!sim_violation, "no violation");
    check(hs_period == 800, $sformatf("line %0d clocks", hs_period));
    check(vs_period == 420_000, $sformatf("frame %0d clocks", vs_period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
