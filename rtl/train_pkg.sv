// train_pkg: types and constants shared by the train simulator, the
// physical-track controller and the train controller.
//
// The layout has two trains, five track segments each with one sensor, and
// three track switches. A switch value of 1 selects the inside route and 0
// the outside route. The controller interface (track power, direction and
// switch settings) is the same for the simulator and for the physical track,
// so one controller can drive either. Segment and switch numbering, the
// per-train power/direction bits and the DCC packet layout are this design's
// own choices.
package train_pkg;

  localparam int unsigned NUM_TRAINS   = 2;
  localparam int unsigned NUM_SEGS     = 5;
  localparam int unsigned NUM_SENSORS  = 5;
  localparam int unsigned NUM_SWITCHES = 3;

  // Track segments. Sensor i sits at the middle of segment i.
  typedef enum logic [2:0] {
    SEG_OUTER_L = 3'd0,  // outer loop, bottom-left switch up to the top switch
    SEG_OUTER_R = 3'd1,  // outer loop, top switch down to the bottom-right switch
    SEG_BOTTOM  = 3'd2,  // bottom stretch shared by both loops
    SEG_INNER   = 3'd3,  // inner loop between the two bottom switches
    SEG_SPUR    = 3'd4   // spur from the top switch to a dead end
  } seg_e;

  // Switch indices.
  localparam int unsigned SW_TOP = 0;  // trunk OUTER_L; 0: OUTER_R, 1: SPUR
  localparam int unsigned SW_BL  = 1;  // trunk BOTTOM;  0: OUTER_L, 1: INNER
  localparam int unsigned SW_BR  = 2;  // trunk BOTTOM;  0: OUTER_R, 1: INNER

  localparam int unsigned TRAIN_A = 0;
  localparam int unsigned TRAIN_B = 1;

  typedef logic [3:0] speed_t;  // speed step, 0 = stop, 14 = fastest

  // Outputs of the train controller.
  typedef struct packed {
    logic [NUM_TRAINS-1:0]   track;  // 1: power on for that train
    logic [NUM_TRAINS-1:0]   fwd;    // 1: forward, 0: reverse
    logic [NUM_SWITCHES-1:0] sw;     // 1: inside route, 0: outside route
  } train_cmd_t;

  typedef enum logic [1:0] {
    VIOL_NONE      = 2'd0,
    VIOL_COLLISION = 2'd1,  // two trains in one segment or on the crossing
    VIOL_DERAIL    = 2'd2   // ran backwards through a switch set against it
  } viol_e;

  // State of the simulated layout, for the display.
  typedef struct packed {
    seg_e  [NUM_TRAINS-1:0]   seg;
    logic  [NUM_TRAINS-1:0][7:0] pos;
    logic  [NUM_SWITCHES-1:0] sw;
    logic  [NUM_SENSORS-1:0]  sensors;
    viol_e                    viol;
    seg_e                     viol_seg;
  } sim_state_t;

  // One DCC packet: address, instruction and error-detection byte.
  typedef struct packed {
    logic [7:0] addr;
    logic [7:0] instr;
    logic [7:0] check;
  } dcc_pkt_t;

endpackage
