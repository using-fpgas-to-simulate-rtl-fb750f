// tb_track_ctrl_core: drives the core's controller side directly and acts as
// the H-bridge interface, taking a bit every 3 clocks. The bit stream is
// parsed here into packets and checked against the NMRA speed/direction
// packets expected for trains 3 and 4, including a speed change, a
// direction change and power off. Switch changes must produce 100 ms coil
// pulses (1000 clocks at 10 kHz) and a raw sensor must reach the sensor
// output after filtering.
module tb_track_ctrl_core;
  import train_pkg::*;
  localparam int CLK_HZ = 10_000;
  logic clk = 0, reset = 1;
  speed_t [1:0] speed;
  train_cmd_t cmd;
  logic [4:0] sensors_in = '0, sensors;
  logic dcc_bit, dcc_take = 0, dcc_pkt_start;
  logic [2:0] sw_inside, sw_outside;
  int checks = 0, failures = 0;

  track_ctrl_core #(.CLK_HZ(CLK_HZ), .PULSE_MS(100), .FILTER_CYCLES(4)) dut (
    .clk, .reset, .speed, .cmd, .sensors_in, .sensors, .dcc_bit, .dcc_take,
    .dcc_pkt_start, .sw_inside, .sw_outside);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Taker: one bit every 3 clocks, parsed into packets.
  logic [7:0] last_instr [8];   // by address
  int pkts_seen [8];
  int bad_pkts = 0;
  initial begin
    int ones;
    logic [7:0] by [3];
    logic bv;
    for (int i = 0; i < 8; i++) begin last_instr[i] = 0; pkts_seen[i] = 0; end
    wait (!reset);
    ones = 0;
    forever begin
      repeat (2) @(negedge clk);
      bv = dcc_bit; dcc_take = 1;
      @(negedge clk) dcc_take = 0;
      if (bv) ones++;
      else if (ones >= 10) begin
        // start bit seen: read 3 bytes with separators
        for (int k = 0; k < 3; k++) begin
          for (int j = 7; j >= 0; j--) begin
            repeat (2) @(negedge clk);
            by[k][j] = dcc_bit; dcc_take = 1;
            @(negedge clk) dcc_take = 0;
          end
          repeat (2) @(negedge clk);
          bv = dcc_bit; dcc_take = 1;
          @(negedge clk) dcc_take = 0;
          if (bv != (k == 2)) bad_pkts++;
        end
        if ((by[0] ^ by[1]) != by[2] || by[0] > 7) bad_pkts++;
        else begin last_instr[by[0]] = by[1]; pkts_seen[by[0]]++; end
        ones = 1;
      end else ones = 0;
    end
  end

  task automatic wait_pkts(int n);
    int a3, a4;
    a3 = pkts_seen[3]; a4 = pkts_seen[4];
    while (pkts_seen[3] < a3 + n || pkts_seen[4] < a4 + n) @(negedge clk);
  endtask

  int n;
  initial begin
    speed[0] = 4'd6; speed[1] = 4'd14;
    cmd = '0; cmd.track = 2'b11; cmd.fwd = 2'b11;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    wait_pkts(2);
    check(last_instr[3] == 8'h67, $sformatf("train 3 instr %h, expected 67", last_instr[3]));
    check(last_instr[4] == 8'h6F, $sformatf("train 4 instr %h, expected 6F", last_instr[4]));
    // Reverse and slower for train 3; power off for train 4.
    speed[0] = 4'd1; cmd.fwd[0] = 0; cmd.track[1] = 0;
    wait_pkts(2);
    check(last_instr[3] == 8'h42, $sformatf("train 3 reverse instr %h, expected 42", last_instr[3]));
    check(last_instr[4] == 8'h60, $sformatf("train 4 stopped instr %h, expected 60", last_instr[4]));
    check(bad_pkts == 0, $sformatf("%0d malformed packets", bad_pkts));
    check(pkts_seen[3] >= 4 && pkts_seen[4] >= 4, "both trains repeated");

    // Switch 2 inside: 1000-clock pulse on its inside coil.
    @(negedge clk) cmd.sw[2] = 1;
    @(negedge clk);
    check(sw_inside == 3'b100 && sw_outside == 0, "switch 2 inside coil");
    n = 0;
    while (sw_inside[2]) begin @(negedge clk); n++; end
    check(n == 1000, $sformatf("pulse %0d clocks, expected 1000", n));

    // Sensor path: 4-clock filter plus 2 synchroniser clocks.
    @(negedge clk) sensors_in[3] = 1;
    repeat (5) @(negedge clk);
    check(sensors[3] == 0, "sensor not yet through");
    repeat (2) @(negedge clk);
    check(sensors == 5'b01000, "sensor 3 through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
