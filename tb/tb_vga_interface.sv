// tb_vga_interface: checks 640x480@60 timing (800-clock lines with a
// 96-clock hsync pulse, 525-line frames with a 2-line vsync pulse), blanking,
// the colours of sample pixels for free track, occupied segments, sensors and
// switches, and the blinking of the segment where a violation happened
// (toggling every 16 frames), and the train markers placed along the
// segment centre lines.
module tb_vga_interface;
  import train_pkg::*;
  logic clk = 0, reset = 1;
  sim_state_t disp;
  logic hsync, vsync;
  logic [3:0] r, g, b;
  int checks = 0, failures = 0;

  vga_interface dut (.clk, .reset, .disp, .hsync, .vsync, .r, .g, .b);

  always #5 clk = ~clk;

  initial begin
    #(10 * 800 * 525 * 70);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Colour shown for pixel (px, py) of the coming frame.
  task automatic pixel(int px, int py, output logic [11:0] c);
    // Sample between edges: the colour of (px, py) is registered on the
    // edge after the counters show it.
    @(negedge clk);
    while (!(dut.x == 10'(px) && dut.y == 10'(py))) @(negedge clk);
    @(negedge clk);
    c = {r, g, b};
  endtask

  // Measure sync periods and pulse widths.
  int hs_fall = 0, hs_rise = 0, hs_period = 0, hs_width = 0, vs_fall = 0, vs_period = 0, vs_width = 0;
  int now = 0;
  logic hs_d = 1, vs_d = 1;
  always @(posedge clk) begin
    now++;
    if (hs_d && !hsync) begin if (hs_fall) hs_period = now - hs_fall; hs_fall = now; end
    if (!hs_d && hsync) hs_width = now - hs_fall;
    if (vs_d && !vsync) begin if (vs_fall) vs_period = now - vs_fall; vs_fall = now; end
    if (!vs_d && vsync) vs_width = now - vs_fall;
    hs_d <= hsync; vs_d <= vsync;
  end

  initial begin
    logic [11:0] c;
    disp = '0;
    disp.seg[TRAIN_A] = SEG_OUTER_L;
    disp.seg[TRAIN_B] = SEG_INNER;
    disp.pos[TRAIN_B] = 8'd32;
    disp.sensors = 5'b00010;          // OUTER_R sensor active
    disp.sw = 3'b010;                 // BL inside
    disp.viol = VIOL_NONE;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;

    pixel(20, 20, c);    check(c == 12'h444, $sformatf("background %h", c));
    pixel(90, 200, c);   check(c == 12'hFAA, $sformatf("OUTER_L tinted for A %h", c));
    pixel(260, 300, c);  check(c == 12'hAAF, $sformatf("INNER tinted for B %h", c));
    // Markers: A at OUTER_L position 0 sits on the bottom-left switch (260,452);
    // B at INNER position 32 of 64 is 32*696/63 = 353 px along: (345,184).
    pixel(255, 447, c);  check(c == 12'hF00, $sformatf("A marker corner %h", c));
    pixel(265, 457, c);  check(c == 12'hF00, $sformatf("A marker corner %h", c));
    pixel(266, 452, c);  check(c != 12'hF00, $sformatf("A marker is 11 px wide %h", c));
    pixel(345, 184, c);  check(c == 12'h00F, $sformatf("B marker %h", c));
    pixel(352, 184, c);  check(c == 12'hAAF, $sformatf("next to B marker %h", c));
    // Move A to the far end of OUTER_R: marker on the bottom-right switch (420,452).
    disp.seg[TRAIN_A] = SEG_OUTER_R; disp.pos[TRAIN_A] = 8'd63;
    pixel(0, 1, c);
    pixel(420, 452, c);  check(c == 12'hF00, $sformatf("A marker moved %h", c));
    pixel(588, 200, c);  check(c == 12'hFAA, $sformatf("OUTER_R now tinted %h", c));
    disp.seg[TRAIN_A] = SEG_OUTER_L; disp.pos[TRAIN_A] = 8'd0;
    pixel(0, 1, c);
    pixel(588, 200, c);  check(c == 12'hEEE, $sformatf("free OUTER_R %h", c));
    pixel(340, 150, c);  check(c == 12'hEEE, $sformatf("free spur %h", c));
    pixel(615, 385, c);  check(c == 12'hFF0, $sformatf("active sensor %h", c));
    pixel(55, 385, c);   check(c == 12'h222, $sformatf("idle sensor %h", c));
    pixel(245, 470, c);  check(c == 12'h0F0, $sformatf("switch inside %h", c));
    pixel(435, 470, c);  check(c == 12'hFFF, $sformatf("switch outside %h", c));
    pixel(700, 100, c);  check(c == 12'h000, $sformatf("blanking %h", c));
    pixel(100, 500, c);  check(c == 12'h000, $sformatf("vertical blanking %h", c));

    // Let two frames pass for the sync measurements.
    repeat (2 * 800 * 525) @(posedge clk);
    check(hs_period == 800, $sformatf("line period %0d", hs_period));
    check(hs_width == 96, $sformatf("hsync width %0d", hs_width));
    check(vs_period == 800 * 525, $sformatf("frame period %0d", vs_period));
    check(vs_width == 2 * 800, $sformatf("vsync width %0d", vs_width));

    // Violation on OUTER_R: it blinks between black and its colour.
    disp.viol = VIOL_DERAIL;
    disp.viol_seg = SEG_OUTER_R;
    begin
      int dark = 0, lit = 0, changes = 0;
      logic last_dark = 0;
      for (int f = 0; f < 36; f++) begin
        pixel(90, 200, c);
        if (c != 12'hFAA) begin failures++; $display("FAIL: other segment blinked"); end
        pixel(588, 200, c);
        if (c == 12'h000) dark++; else if (c == 12'hEEE) lit++;
        if (f > 0 && (c == 12'h000) != last_dark) changes++;
        last_dark = (c == 12'h000);
      end
      check(dark >= 16 && lit >= 16 && dark + lit == 36, $sformatf("blink dark=%0d lit=%0d", dark, lit));
      check(changes >= 2 && changes <= 3, $sformatf("blink toggled %0d times in 36 frames", changes));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
