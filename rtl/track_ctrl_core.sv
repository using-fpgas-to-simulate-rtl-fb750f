// track_ctrl_core: the train track controller core of the physical layout.
//
// It gives the train controller the same interface as the simulator core:
// conditioned sensor signals in one direction, track power, direction and
// switch settings in the other. Inside, one dcc_packet_builder per train
// turns that train's speed step, power and direction into a registered DCC
// command; dcc_serializer repeats both commands as one serial bit stream
// for the H-bridge interface; switch_pulser converts switch changes into
// 100 ms coil pulses; sensor_input synchronises and filters the five
// photointerrupter lines. The two DCC addresses (3 and 4) are this design's
// choice. The serial stream uses the bit/take handshake of dcc_serializer.
module track_ctrl_core
  import train_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 25_000_000,
  parameter int unsigned PULSE_MS      = 100,
  parameter int unsigned FILTER_CYCLES = CLK_HZ / 1000,
  parameter logic [6:0]  ADDR_A        = 7'd3,
  parameter logic [6:0]  ADDR_B        = 7'd4
) (
  input  logic                    clk,
  input  logic                    reset,
  input  speed_t [NUM_TRAINS-1:0] speed,
  input  train_cmd_t              cmd,
  input  logic [NUM_SENSORS-1:0]  sensors_in,
  output logic [NUM_SENSORS-1:0]  sensors,
  output logic                    dcc_bit,
  input  logic                    dcc_take,
  output logic                    dcc_pkt_start,
  output logic [NUM_SWITCHES-1:0] sw_inside,
  output logic [NUM_SWITCHES-1:0] sw_outside
);
  dcc_pkt_t [NUM_TRAINS-1:0] pkts;
  logic [$clog2(NUM_TRAINS+1)-1:0] cur;

  dcc_packet_builder #(.ADDR(ADDR_A)) u_pkt_a (
    .clk, .reset, .speed(speed[TRAIN_A]), .power(cmd.track[TRAIN_A]),
    .fwd(cmd.fwd[TRAIN_A]), .pkt(pkts[TRAIN_A]));

  dcc_packet_builder #(.ADDR(ADDR_B)) u_pkt_b (
    .clk, .reset, .speed(speed[TRAIN_B]), .power(cmd.track[TRAIN_B]),
    .fwd(cmd.fwd[TRAIN_B]), .pkt(pkts[TRAIN_B]));

  dcc_serializer #(.NUM_CMDS(NUM_TRAINS)) u_ser (
    .clk, .reset, .pkts, .take(dcc_take), .bit_out(dcc_bit),
    .pkt_start(dcc_pkt_start), .cur);

  switch_pulser #(.CLK_HZ(CLK_HZ), .PULSE_MS(PULSE_MS), .NUM_SW(NUM_SWITCHES)) u_sw (
    .clk, .reset, .sw(cmd.sw), .sw_inside, .sw_outside);

  sensor_input #(.NUM(NUM_SENSORS), .FILTER_CYCLES(FILTER_CYCLES)) u_sens (
    .clk, .reset, .raw(sensors_in), .clean(sensors));
endmodule
