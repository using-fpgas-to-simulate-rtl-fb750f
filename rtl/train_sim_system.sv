// train_sim_system: the virtual train simulator with its controller.
//
// Wiring of the simulator configuration: the simulator core takes the speed
// inputs, gives the five sensor signals to the train controller and takes
// back its track power, direction and switch settings; the VGA interface
// draws the core's state. Clock and reset go to all three. CLOCKWISE picks
// the controller's running direction and matching start positions. `violation` is
// high once the core has stopped on a collision or derailment; `sensors`,
// `cmd` and `state` are brought out for observation.
module train_sim_system
  import train_pkg::*;
#(
  parameter int unsigned SEG_LEN    = 64,
  parameter int unsigned STEP_DIV   = 5_000_000,
  parameter int unsigned SENSOR_WIN = 2,
  parameter bit          CLOCKWISE  = 1'b1
) (
  input  logic                    clk,
  input  logic                    reset,
  input  speed_t [NUM_TRAINS-1:0] speed,
  output logic                    hsync,
  output logic                    vsync,
  output logic [3:0]              r,
  output logic [3:0]              g,
  output logic [3:0]              b,
  output logic                    violation,
  output logic [NUM_SENSORS-1:0]  sensors,
  output train_cmd_t              cmd,
  output sim_state_t              state,
  output logic                    a_waiting,
  output logic                    b_waiting
);
  logic [1:0] owner;

  // Start positions suit the controller's direction: each train starts just
  // before the sensor where it first asks for the bottom, or (train A,
  // clockwise) where it does not need the bottom yet.
  localparam int unsigned START_A = CLOCKWISE ? 0 : SEG_LEN - 1;
  localparam int unsigned START_B = CLOCKWISE ? 1 : SEG_LEN - 2;

  sim_core #(.SEG_LEN(SEG_LEN), .STEP_DIV(STEP_DIV), .SENSOR_WIN(SENSOR_WIN),
             .START_A(START_A), .START_B(START_B)) u_core (
    .clk, .reset, .speed, .cmd, .sensors, .disp(state));

  train_controller #(.CLOCKWISE(CLOCKWISE)) u_ctrl (
    .clk, .reset, .sensors, .cmd, .a_waiting, .b_waiting, .owner_o(owner));

  vga_interface #(.SEG_LEN(SEG_LEN)) u_vga (.clk, .reset, .disp(state), .hsync, .vsync, .r, .g, .b);

  assign violation = (state.viol != VIOL_NONE);
endmodule
