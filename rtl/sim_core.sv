// sim_core: the virtual train layout.
//
// Two trains move over five track segments joined by three switches:
//
//   OUTER_L: end 0 at BL (outside leg)  end 1 at TOP (trunk)
//   OUTER_R: end 0 at TOP (outside leg) end 1 at BR (outside leg)
//   BOTTOM : end 0 at BR (trunk)        end 1 at BL (trunk)
//   INNER  : end 0 at BL (inside leg)   end 1 at BR (inside leg)
//   SPUR   : end 0 at TOP (inside leg)  end 1 is a dead end
//
// so the outer loop is BOTTOM-OUTER_L-OUTER_R, the inner loop BOTTOM-INNER,
// and the spur leaves the top of the outer loop and crosses the inner loop at
// the middle of both. A train entering a switch at its trunk follows the
// switch setting; one entering at a leg must find the switch set for that
// leg, otherwise it derails. Two trains in one segment, or both on the
// crossing, is a collision. On either violation every train stops and the
// type and segment are kept until reset; the display flashes that segment.
// This layout is this design's reading of the source's description and
// figure; segment lengths, the sensor and crossing positions and the motion
// rule are its own choices.
//
// Each train is a point with a position 0..SEG_LEN-1 in its segment and a
// heading (which end it moves to when driven forward). With its track power
// on, a train adds its speed step to an accumulator every clock and moves
// one position each time the accumulator passes STEP_DIV. Sensor i is high
// while a train is within SENSOR_WIN positions of the middle of segment i.
// A train stops at the spur's dead end. After reset train A stands on
// OUTER_L at position START_A and train B on INNER at START_B, both heading
// for end 1 of their segment. Outputs are registered state plus
// combinational sensors.
module sim_core
  import train_pkg::*;
#(
  parameter int unsigned SEG_LEN    = 64,
  parameter int unsigned STEP_DIV   = 5_000_000,
  parameter int unsigned SENSOR_WIN = 2,
  parameter int unsigned START_A    = 0,
  parameter int unsigned START_B    = 1
) (
  input  logic                    clk,
  input  logic                    reset,
  input  speed_t [NUM_TRAINS-1:0] speed,
  input  train_cmd_t              cmd,
  output logic [NUM_SENSORS-1:0]  sensors,
  output sim_state_t              disp
);
  localparam int unsigned MID = SEG_LEN / 2;
  localparam int unsigned AW  = $clog2(STEP_DIV + 16);

  // Switch legs.
  typedef enum logic [1:0] {LEG_TRUNK, LEG_OUT, LEG_IN, LEG_DEAD} leg_e;
  typedef struct packed { logic [1:0] sw; leg_e leg; } node_t;
  typedef struct packed { seg_e seg; logic end1; } place_t;

  // Which switch leg a segment end is joined to.
  function automatic node_t node_at(seg_e s, logic e);
    unique case (s)
      SEG_OUTER_L: return e ? node_t'{2'(SW_TOP), LEG_TRUNK} : node_t'{2'(SW_BL), LEG_OUT};
      SEG_OUTER_R: return e ? node_t'{2'(SW_BR), LEG_OUT}    : node_t'{2'(SW_TOP), LEG_OUT};
      SEG_BOTTOM:  return e ? node_t'{2'(SW_BL), LEG_TRUNK}  : node_t'{2'(SW_BR), LEG_TRUNK};
      SEG_INNER:   return e ? node_t'{2'(SW_BR), LEG_IN}     : node_t'{2'(SW_BL), LEG_IN};
      default:     return e ? node_t'{2'(SW_TOP), LEG_DEAD}  : node_t'{2'(SW_TOP), LEG_IN};
    endcase
  endfunction

  // Which segment end a switch leg leads to.
  function automatic place_t place_at(logic [1:0] sw, leg_e leg);
    unique case (sw)
      2'(SW_TOP): unique case (leg)
        LEG_TRUNK: return place_t'{SEG_OUTER_L, 1'b1};
        LEG_OUT:   return place_t'{SEG_OUTER_R, 1'b0};
        default:   return place_t'{SEG_SPUR,    1'b0};
      endcase
      2'(SW_BL): unique case (leg)
        LEG_TRUNK: return place_t'{SEG_BOTTOM,  1'b1};
        LEG_OUT:   return place_t'{SEG_OUTER_L, 1'b0};
        default:   return place_t'{SEG_INNER,   1'b0};
      endcase
      default: unique case (leg)
        LEG_TRUNK: return place_t'{SEG_BOTTOM,  1'b0};
        LEG_OUT:   return place_t'{SEG_OUTER_R, 1'b1};
        default:   return place_t'{SEG_INNER,   1'b1};
      endcase
    endcase
  endfunction

  function automatic logic near_mid(logic [7:0] p);
    return (int'(p) + int'(SENSOR_WIN) >= int'(MID)) && (int'(p) <= int'(MID + SENSOR_WIN));
  endfunction

  seg_e       seg  [NUM_TRAINS];
  logic [7:0] pos  [NUM_TRAINS];
  logic       head [NUM_TRAINS];
  logic [AW-1:0] acc [NUM_TRAINS];
  viol_e      viol;
  seg_e       viol_seg;

  // Collision in the current state.
  logic collide;
  seg_e collide_seg;
  always_comb begin
    collide     = 1'b0;
    collide_seg = seg[0];
    if (seg[0] == seg[1]) collide = 1'b1;
    else if (((seg[0] == SEG_INNER && seg[1] == SEG_SPUR) ||
              (seg[0] == SEG_SPUR && seg[1] == SEG_INNER)) &&
             near_mid(pos[0]) && near_mid(pos[1])) begin
      collide     = 1'b1;
      collide_seg = SEG_INNER;
    end
  end

  wire frozen = (viol != VIOL_NONE) || collide;

  // Next state of each train.
  seg_e       seg_n  [NUM_TRAINS];
  logic [7:0] pos_n  [NUM_TRAINS];
  logic       head_n [NUM_TRAINS];
  logic [AW-1:0] acc_n [NUM_TRAINS];
  logic       derail [NUM_TRAINS];

  always_comb begin
    for (int t = 0; t < NUM_TRAINS; t++) begin
      logic   m1, step;
      logic [AW-1:0] sum;
      node_t  nd;
      place_t pl;
      seg_n[t]  = seg[t];
      pos_n[t]  = pos[t];
      head_n[t] = head[t];
      acc_n[t]  = acc[t];
      derail[t] = 1'b0;
      m1   = cmd.fwd[t] ? head[t] : ~head[t];
      sum  = acc[t] + AW'(speed[t]);
      step = 1'b0;
      nd   = node_at(seg[t], m1);
      pl   = place_at(nd.sw, LEG_TRUNK);
      if (!frozen && cmd.track[t] && speed[t] != '0) begin
        if (sum >= AW'(STEP_DIV)) begin
          acc_n[t] = sum - AW'(STEP_DIV);
          step     = 1'b1;
        end else acc_n[t] = sum;
      end
      if (step) begin
        if (m1 && pos[t] != 8'(SEG_LEN - 1)) pos_n[t] = pos[t] + 8'd1;
        else if (!m1 && pos[t] != 8'd0)      pos_n[t] = pos[t] - 8'd1;
        else if (nd.leg != LEG_DEAD) begin
          if (nd.leg == LEG_TRUNK) begin
            pl = place_at(nd.sw, cmd.sw[nd.sw] ? LEG_IN : LEG_OUT);
          end else begin
            if (cmd.sw[nd.sw] != (nd.leg == LEG_IN)) derail[t] = 1'b1;
            pl = place_at(nd.sw, LEG_TRUNK);
          end
          if (!derail[t]) begin
            seg_n[t]  = pl.seg;
            pos_n[t]  = pl.end1 ? 8'(SEG_LEN - 1) : 8'd0;
            // Keep moving away from the end just entered.
            head_n[t] = cmd.fwd[t] ? ~pl.end1 : pl.end1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      seg[TRAIN_A]  <= SEG_OUTER_L;
      pos[TRAIN_A]  <= 8'(START_A);
      head[TRAIN_A] <= 1'b1;
      acc[TRAIN_A]  <= '0;
      seg[TRAIN_B]  <= SEG_INNER;
      pos[TRAIN_B]  <= 8'(START_B);
      head[TRAIN_B] <= 1'b1;
      acc[TRAIN_B]  <= '0;
      viol          <= VIOL_NONE;
      viol_seg      <= SEG_OUTER_L;
    end else begin
      for (int t = 0; t < NUM_TRAINS; t++) begin
        seg[t]  <= seg_n[t];
        pos[t]  <= pos_n[t];
        head[t] <= head_n[t];
        acc[t]  <= acc_n[t];
      end
      if (viol == VIOL_NONE) begin
        if (collide) begin
          viol     <= VIOL_COLLISION;
          viol_seg <= collide_seg;
        end else if (derail[TRAIN_A]) begin
          viol     <= VIOL_DERAIL;
          viol_seg <= seg[TRAIN_A];
        end else if (derail[TRAIN_B]) begin
          viol     <= VIOL_DERAIL;
          viol_seg <= seg[TRAIN_B];
        end
      end
    end
  end

  always_comb begin
    sensors = '0;
    for (int t = 0; t < NUM_TRAINS; t++)
      if (near_mid(pos[t])) sensors[seg[t]] = 1'b1;
  end

  always_comb begin
    for (int t = 0; t < NUM_TRAINS; t++) begin
      disp.seg[t] = seg[t];
      disp.pos[t] = pos[t];
    end
    disp.sw       = cmd.sw;
    disp.sensors  = sensors;
    disp.viol     = viol;
    disp.viol_seg = viol_seg;
  end

  // Trains stay inside their segment.
  for (genvar t = 0; t < NUM_TRAINS; t++) begin : g_chk
    a_pos_range: assert property (@(posedge clk) disable iff (reset) pos[t] < 8'(SEG_LEN));
  end
endmodule
