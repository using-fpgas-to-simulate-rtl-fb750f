// train_controller: example safety controller for the two-train layout.
//
// This is the kind of state machine the lab's students write; it plugs into
// either the simulator core or the physical-track core, which share its
// interface. The pattern is this design's own: train A runs round the outer
// loop, train B round the inner loop, both clockwise (forward) or, with
// CLOCKWISE = 0, both counter-clockwise (reverse), and the bottom stretch
// that both loops share is granted to one train at a time.
//
//  * A asks for the bottom when it passes the sensor of the outer side that
//    leads into the bottom (OUTER_R clockwise, OUTER_L counter-clockwise) and
//    gives it back at the sensor of the other outer side, once it has left
//    the bottom.
//  * B gives the bottom back and asks again at the INNER sensor.
//  * A train that asks while the other one holds the bottom has its track
//    power cut, so it stops at that sensor, until the bottom is handed to it.
//    A is preferred when both are waiting.
//  * The two bottom switches are set for the holder (outside for A, inside
//    for B) and keep their setting while nobody holds the bottom. The top
//    switch stays on the outer loop; the spur is not used.
//
// Sensor events are rising edges. Outputs are registered.
module train_controller
  import train_pkg::*;
#(
  parameter bit CLOCKWISE = 1'b1
) (
  input  logic                   clk,
  input  logic                   reset,
  input  logic [NUM_SENSORS-1:0] sensors,
  output train_cmd_t             cmd,
  // Observation of the controller's decisions.
  output logic                   a_waiting,
  output logic                   b_waiting,
  output logic [1:0]             owner_o
);
  typedef enum logic [1:0] {OWN_NONE, OWN_A, OWN_B} owner_e;

  owner_e                 owner, owner_n;
  logic                   a_wait, a_wait_n, b_wait, b_wait_n;
  logic                   inner_route, inner_route_n;
  logic [NUM_SENSORS-1:0] prev, rise;

  assign rise = sensors & ~prev;

  // Sensors where train A asks for and releases the bottom.
  localparam seg_e A_ASK     = CLOCKWISE ? SEG_OUTER_R : SEG_OUTER_L;
  localparam seg_e A_RELEASE = CLOCKWISE ? SEG_OUTER_L : SEG_OUTER_R;

  always_comb begin
    owner_n  = owner;
    a_wait_n = a_wait;
    b_wait_n = b_wait;

    // Train A approaches the bottom.
    if (rise[A_ASK]) begin
      if (owner_n == OWN_NONE) owner_n  = OWN_A;
      else if (owner_n != OWN_A) a_wait_n = 1'b1;
    end

    // Train A is clear of the bottom.
    if (rise[A_RELEASE] && owner_n == OWN_A) begin
      if (b_wait_n) begin
        owner_n  = OWN_B;
        b_wait_n = 1'b0;
      end else owner_n = OWN_NONE;
    end

    // Train B is clear of the bottom and asks for it again.
    if (rise[SEG_INNER]) begin
      if (owner_n == OWN_B) begin
        if (a_wait_n) begin
          owner_n  = OWN_A;
          a_wait_n = 1'b0;
          b_wait_n = 1'b1;
        end
      end else if (owner_n == OWN_NONE) owner_n  = OWN_B;
      else                                b_wait_n = 1'b1;
    end

    unique case (owner_n)
      OWN_A:   inner_route_n = 1'b0;
      OWN_B:   inner_route_n = 1'b1;
      default: inner_route_n = inner_route;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      owner       <= OWN_NONE;
      a_wait      <= 1'b0;
      b_wait      <= 1'b0;
      inner_route <= 1'b0;
      prev        <= '0;
    end else begin
      owner       <= owner_n;
      a_wait      <= a_wait_n;
      b_wait      <= b_wait_n;
      inner_route <= inner_route_n;
      prev        <= sensors;
    end
  end

  always_comb begin
    cmd.track          = '0;
    cmd.track[TRAIN_A] = ~a_wait;
    cmd.track[TRAIN_B] = ~b_wait;
    cmd.fwd            = CLOCKWISE ? '1 : '0;
    cmd.sw             = '0;
    cmd.sw[SW_BL]      = inner_route;
    cmd.sw[SW_BR]      = inner_route;
  end

  assign a_waiting = a_wait;
  assign b_waiting = b_wait;
  assign owner_o   = owner;

  // The holder of the bottom never waits, and at most one train waits.
  a_holder_runs: assert property (@(posedge clk) disable iff (reset)
    !((owner == OWN_A && a_wait) || (owner == OWN_B && b_wait)));
  a_one_waits: assert property (@(posedge clk) disable iff (reset) !(a_wait && b_wait));
endmodule
