// train_lab_top: both halves of the model-train lab side by side.
//
// The simulator system (train controller + simulator core + VGA) lets a
// controller be tried safely on a monitor; the track system (the same
// controller + track controller core + H-bridge interface) runs it on the
// real DCC layout. On the board they are two separate configurations with an
// identical controller interface; here they share clock and reset and each
// has its own controller instance and speed inputs. CLOCKWISE sets the
// running direction of both controllers. All ports are plain signals.
module train_lab_top
  import train_pkg::*;
#(
  parameter int unsigned CLK_HZ   = 25_000_000,
  parameter int unsigned SEG_LEN  = 64,
  parameter int unsigned STEP_DIV = 5_000_000,
  parameter int unsigned PULSE_MS = 100,
  parameter bit          CLOCKWISE = 1'b1
) (
  input  logic                    clk,
  input  logic                    reset,
  // Simulator configuration
  input  logic [NUM_TRAINS-1:0][3:0] sim_speed,
  output logic                    vga_hsync,
  output logic                    vga_vsync,
  output logic [3:0]              vga_r,
  output logic [3:0]              vga_g,
  output logic [3:0]              vga_b,
  output logic                    sim_violation,
  output logic [NUM_SENSORS-1:0]  sim_sensors,
  // Physical-track configuration
  input  logic [NUM_TRAINS-1:0][3:0] trk_speed,
  input  logic [NUM_SENSORS-1:0]  trk_sensors_in,
  output logic [NUM_SWITCHES-1:0] trk_sw_inside,
  output logic [NUM_SWITCHES-1:0] trk_sw_outside,
  output logic                    hb_dir,
  output logic                    hb_pwm,
  output logic                    hb_brake
);
  train_cmd_t sim_cmd, trk_cmd;
  sim_state_t sim_state;
  logic       sim_a_wait, sim_b_wait, trk_pkt_start;

  train_sim_system #(.SEG_LEN(SEG_LEN), .STEP_DIV(STEP_DIV), .CLOCKWISE(CLOCKWISE)) u_sim (
    .clk, .reset, .speed(sim_speed), .hsync(vga_hsync), .vsync(vga_vsync),
    .r(vga_r), .g(vga_g), .b(vga_b), .violation(sim_violation),
    .sensors(sim_sensors), .cmd(sim_cmd), .state(sim_state),
    .a_waiting(sim_a_wait), .b_waiting(sim_b_wait));

  track_ctrl_system #(.CLK_HZ(CLK_HZ), .PULSE_MS(PULSE_MS), .CLOCKWISE(CLOCKWISE)) u_trk (
    .clk, .reset, .speed(trk_speed), .sensors_in(trk_sensors_in),
    .sw_inside(trk_sw_inside), .sw_outside(trk_sw_outside),
    .hb_dir, .hb_pwm, .hb_brake, .cmd(trk_cmd), .dcc_pkt_start(trk_pkt_start));
endmodule
