// track_ctrl_system: controller for the physical DCC model-train layout.
//
// Wiring of the physical configuration: the five raw sensor lines enter the
// train track controller core, which gives conditioned sensors to the train
// controller and takes back the same track power, direction and switch
// signals as the simulator does. The core drives the six switch-coil lines
// and hands its DCC bit stream to the H-bridge interface, which drives the
// external LMD18200 H-bridge (DIR, PWM, BRAKE) feeding the rails.
// CLOCKWISE picks the controller's running direction.
module track_ctrl_system
  import train_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 25_000_000,
  parameter int unsigned PULSE_MS      = 100,
  parameter int unsigned FILTER_CYCLES = CLK_HZ / 1000,
  parameter bit          CLOCKWISE     = 1'b1
) (
  input  logic                    clk,
  input  logic                    reset,
  input  speed_t [NUM_TRAINS-1:0] speed,
  input  logic [NUM_SENSORS-1:0]  sensors_in,
  output logic [NUM_SWITCHES-1:0] sw_inside,
  output logic [NUM_SWITCHES-1:0] sw_outside,
  output logic                    hb_dir,
  output logic                    hb_pwm,
  output logic                    hb_brake,
  output train_cmd_t              cmd,
  output logic                    dcc_pkt_start
);
  logic [NUM_SENSORS-1:0] sensors;
  logic dcc_bit, dcc_take, a_waiting, b_waiting;
  logic [1:0] owner;

  track_ctrl_core #(.CLK_HZ(CLK_HZ), .PULSE_MS(PULSE_MS), .FILTER_CYCLES(FILTER_CYCLES)) u_core (
    .clk, .reset, .speed, .cmd, .sensors_in, .sensors, .dcc_bit, .dcc_take,
    .dcc_pkt_start, .sw_inside, .sw_outside);

  train_controller #(.CLOCKWISE(CLOCKWISE)) u_ctrl (
    .clk, .reset, .sensors, .cmd, .a_waiting, .b_waiting, .owner_o(owner));

  hbridge_if #(.CLK_HZ(CLK_HZ)) u_hb (
    .clk, .reset, .bit_in(dcc_bit), .take(dcc_take), .hb_dir, .hb_pwm, .hb_brake);
endmodule
