// tb_track_ctrl_system: the physical-track configuration end to end at a
// 1 MHz clock. The testbench plays the photointerrupters (sensor lines held
// high for 3 ms as a train passes) and listens to the rails through the DCC
// decoder model. It checks that both locomotives get their speed packets,
// that the controller's decisions arrive on the track as stop and go
// packets, that route changes give 100 ms coil pulses, that a 0.2 ms sensor
// glitch is ignored and that every bit has legal DCC timing.
module tb_track_ctrl_system;
  import train_pkg::*;
  localparam int CLK_HZ = 1_000_000;
  logic clk = 0, reset = 1;
  speed_t [1:0] speed;
  logic [4:0] sensors_in = '0;
  logic [2:0] sw_inside, sw_outside;
  logic hb_dir, hb_pwm, hb_brake, pkt_start;
  train_cmd_t cmd;
  int checks = 0, failures = 0;

  track_ctrl_system #(.CLK_HZ(CLK_HZ)) dut (
    .clk, .reset, .speed, .sensors_in, .sw_inside, .sw_outside,
    .hb_dir, .hb_pwm, .hb_brake, .cmd, .dcc_pkt_start(pkt_start));

  logic valid, ok;
  logic [7:0] b0, b1, b2;
  int nbytes, ferr, mn1, mx1, mn0, mx0;
  dcc_rx_model #(.THRESH(80)) rx (.clk, .dir(hb_dir), .valid, .ok, .b0, .b1, .b2,
    .nbytes, .frame_errors(ferr), .min_half1(mn1), .max_half1(mx1), .min_half0(mn0), .max_half0(mx0));

  always #5 clk = ~clk;

  initial begin
    #(10 * 2_000_000);
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

  task automatic wait_pkts(int n);
    int a3, a4;
    a3 = cnt_of[3]; a4 = cnt_of[4];
    while (cnt_of[3] < a3 + n || cnt_of[4] < a4 + n) @(negedge clk);
  endtask

  task automatic train_passes(int s);
    @(negedge clk) sensors_in[s] = 1;
    repeat (3000) @(negedge clk);
    sensors_in[s] = 0;
    repeat (1500) @(negedge clk);
  endtask

  // Length of the next pulse on a coil line (waits for it to start).
  task automatic coil_pulse(bit ins, int idx, output int n);
    int guard = 0;
    while (!(ins ? sw_inside[idx] : sw_outside[idx]) && guard < 50000) begin @(negedge clk); guard++; end
    n = 0;
    while ((ins ? sw_inside[idx] : sw_outside[idx])) begin @(negedge clk); n++; end
  endtask

  int n1, n2;
  initial begin
    for (int i = 0; i < 8; i++) begin instr_of[i] = 0; cnt_of[i] = 0; end
    speed[0] = 4'd5; speed[1] = 4'd9;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    wait_pkts(2);
    check(instr_of[3] == 8'h66, $sformatf("A runs: %h", instr_of[3]));
    check(instr_of[4] == 8'h6A, $sformatf("B runs: %h", instr_of[4]));

    // B passes the INNER sensor: takes the bottom, both bottom switches go inside.
    train_passes(SEG_INNER);
    check(cmd.sw[SW_BL] && cmd.sw[SW_BR], "route set inside");
    // Glitch on OUTER_R shorter than the 1 ms filter: ignored.
    @(negedge clk) sensors_in[SEG_OUTER_R] = 1;
    repeat (200) @(negedge clk);
    sensors_in[SEG_OUTER_R] = 0;
    repeat (3000) @(negedge clk);
    check(cmd.track == 2'b11, "glitch ignored");
    // A arrives while B holds the bottom: A is stopped on the rails.
    train_passes(SEG_OUTER_R);
    wait_pkts(2);
    check(instr_of[3] == 8'h60, $sformatf("A stopped: %h", instr_of[3]));
    check(instr_of[4] == 8'h6A, $sformatf("B still runs: %h", instr_of[4]));
    // B clears: A goes, B stops, bottom switches back outside with 100 ms pulses.
    fork
      train_passes(SEG_INNER);
      coil_pulse(1'b0, SW_BL, n1);
      coil_pulse(1'b0, SW_BR, n2);
    join
    check(n1 == 100_000 && n2 == 100_000, $sformatf("outside pulses %0d %0d clocks", n1, n2));
    wait_pkts(2);
    check(instr_of[3] == 8'h66, $sformatf("A runs again: %h", instr_of[3]));
    check(instr_of[4] == 8'h60, $sformatf("B stopped: %h", instr_of[4]));
    // Speed knob change reaches the rails.
    speed[0] = 4'd14;
    wait_pkts(2);
    check(instr_of[3] == 8'h6F, $sformatf("A full speed: %h", instr_of[3]));

    check(bad == 0 && ferr == 0, $sformatf("bad packets %0d, framing errors %0d", bad, ferr));
    check(mn1 == 58 && mx1 == 58, $sformatf("1 halves %0d..%0d us", mn1, mx1));
    check(mn0 == 100 && mx0 == 100, $sformatf("0 halves %0d..%0d us", mn0, mx0));
    check(2 * mn1 >= 110 && 2 * mx1 <= 190 && 2 * mn0 >= 190 && 2 * mx0 <= 12000, "bit times inside the DCC ranges");
    check(hb_pwm == 1 && hb_brake == 0, "bridge enabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
