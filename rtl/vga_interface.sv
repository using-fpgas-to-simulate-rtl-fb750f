// vga_interface: draws the simulated layout on a 640x480 VGA monitor.
//
// vga_sync supplies the pixel position. For each pixel the renderer checks a
// fixed set of rectangles: the track pieces of each segment (outer
// rectangle, inner rectangle standing on the outer bottom, spur from the top
// down through the inner top), one 11x11 marker per train, one square per
// sensor and one per switch. Colours (4 bits per channel): background grey,
// free track white, the segment holding train A pink and its marker red,
// the segment holding train B light blue and its marker blue, a sensor
// yellow when active and dark grey otherwise, a switch green when set inside
// and white when set outside. After a violation the segment where it
// happened blinks black, toggling every 16 frames.
//
// Each marker's centre is found from the train's segment and position: the
// segment's centre line is a polyline from its end 0 to its end 1 of length
// PLEN pixels, and position p lies p*PLEN/(SEG_LEN-1) pixels along it. The
// centres are computed once per frame, at its first pixel, so a marker
// never tears. The picture follows the general shape of the screen image of
// the original simulator; coordinates and colours are this design's own.
// Colour and sync outputs are registered together, one clock after the
// pixel position.
module vga_interface
  import train_pkg::*;
#(
  parameter int unsigned SEG_LEN = 64
) (
  input  logic       clk,
  input  logic       reset,
  input  sim_state_t disp,
  output logic       hsync,
  output logic       vsync,
  output logic [3:0] r,
  output logic [3:0] g,
  output logic [3:0] b
);
  localparam logic [11:0] C_BG     = 12'h444;
  localparam logic [11:0] C_TRACK  = 12'hEEE;
  localparam logic [11:0] C_A      = 12'hF00;
  localparam logic [11:0] C_B      = 12'h00F;
  localparam logic [11:0] C_A_SEG  = 12'hFAA;
  localparam logic [11:0] C_B_SEG  = 12'hAAF;
  localparam logic [11:0] C_SENS0  = 12'h222;
  localparam logic [11:0] C_SENS1  = 12'hFF0;
  localparam logic [11:0] C_SW_IN  = 12'h0F0;
  localparam logic [11:0] C_SW_OUT = 12'hFFF;
  localparam logic [11:0] C_FLASH  = 12'h000;

  typedef struct packed { logic [9:0] x0, y0, x1, y1; } rect_t;  // x1, y1 exclusive
  localparam int unsigned NR = 11;
  // Track pieces and the segment each belongs to.
  localparam rect_t PIECE [NR] = '{
    '{10'd88,  10'd48,  10'd344, 10'd56 },  // OUTER_L: top left
    '{10'd88,  10'd48,  10'd96,  10'd456},  // OUTER_L: left side
    '{10'd88,  10'd448, 10'd260, 10'd456},  // OUTER_L: bottom left
    '{10'd336, 10'd48,  10'd592, 10'd56 },  // OUTER_R: top right
    '{10'd584, 10'd48,  10'd592, 10'd456},  // OUTER_R: right side
    '{10'd420, 10'd448, 10'd592, 10'd456},  // OUTER_R: bottom right
    '{10'd260, 10'd448, 10'd420, 10'd456},  // BOTTOM
    '{10'd256, 10'd180, 10'd264, 10'd448},  // INNER: left side
    '{10'd256, 10'd180, 10'd424, 10'd188},  // INNER: top
    '{10'd416, 10'd180, 10'd424, 10'd448},  // INNER: right side
    '{10'd336, 10'd56,  10'd344, 10'd300}   // SPUR
  };
  localparam seg_e PIECE_SEG [NR] = '{
    SEG_OUTER_L, SEG_OUTER_L, SEG_OUTER_L, SEG_OUTER_R, SEG_OUTER_R, SEG_OUTER_R,
    SEG_BOTTOM, SEG_INNER, SEG_INNER, SEG_INNER, SEG_SPUR
  };
  // Sensor squares, in segment order, and switch squares (TOP, BL, BR).
  localparam rect_t SENS [NUM_SENSORS] = '{
    '{10'd50,  10'd380, 10'd60,  10'd390},
    '{10'd610, 10'd380, 10'd620, 10'd390},
    '{10'd335, 10'd465, 10'd345, 10'd475},
    '{10'd215, 10'd380, 10'd225, 10'd390},
    '{10'd355, 10'd220, 10'd365, 10'd230}
  };
  localparam rect_t SWR [NUM_SWITCHES] = '{
    '{10'd335, 10'd28,  10'd345, 10'd38 },
    '{10'd240, 10'd465, 10'd250, 10'd475},
    '{10'd430, 10'd465, 10'd440, 10'd475}
  };

  function automatic logic in_rect(rect_t q, logic [9:0] px, logic [9:0] py);
    return px >= q.x0 && px < q.x1 && py >= q.y0 && py < q.y1;
  endfunction

  logic [9:0] x, y;
  logic       vis, hs_n, vs_n, fstart;
  logic [7:0] frames;

  vga_sync u_sync (.clk, .reset, .x, .y, .visible(vis), .hsync_n(hs_n),
                   .vsync_n(vs_n), .frame_start(fstart));

  always_ff @(posedge clk) begin
    if (reset)       frames <= '0;
    else if (fstart) frames <= frames + 8'd1;
  end

  function automatic logic [11:0] seg_colour(seg_e s, sim_state_t d, logic blink);
    logic [11:0] c;
    c = C_TRACK;
    if (d.seg[TRAIN_A] == s) c = C_A_SEG;
    if (d.seg[TRAIN_B] == s) c = C_B_SEG;
    if (d.viol != VIOL_NONE && d.viol_seg == s && blink) c = C_FLASH;
    return c;
  endfunction

  // Centre lines of the segments, from end 0 to end 1.
  typedef struct packed { logic [9:0] x, y; } pt_t;
  localparam int unsigned PLEN [NUM_SEGS] = '{816, 816, 160, 696, 248};

  function automatic pt_t path_point(seg_e s, int unsigned dd);
    int unsigned d;
    d = dd;
    unique case (s)
      SEG_OUTER_L:
        if (d < 168)      return pt_t'{10'(260 - d), 10'd452};
        else if (d < 568) return pt_t'{10'd92, 10'(452 - (d - 168))};
        else              return pt_t'{10'(92 + (d - 568)), 10'd52};
      SEG_OUTER_R:
        if (d < 248)      return pt_t'{10'(340 + d), 10'd52};
        else if (d < 648) return pt_t'{10'd588, 10'(52 + (d - 248))};
        else              return pt_t'{10'(588 - (d - 648)), 10'd452};
      SEG_BOTTOM:         return pt_t'{10'(420 - d), 10'd452};
      SEG_INNER:
        if (d < 268)      return pt_t'{10'd260, 10'(452 - d)};
        else if (d < 428) return pt_t'{10'(260 + (d - 268)), 10'd184};
        else              return pt_t'{10'd420, 10'(184 + (d - 428))};
      default:            return pt_t'{10'd340, 10'(52 + d)};
    endcase
  endfunction

  pt_t mark [NUM_TRAINS];
  always_ff @(posedge clk) begin
    if (reset) begin
      for (int t = 0; t < NUM_TRAINS; t++) mark[t] <= '0;
    end else if (fstart) begin
      for (int t = 0; t < NUM_TRAINS; t++)
        mark[t] <= path_point(disp.seg[t],
                              (int'(disp.pos[t]) * PLEN[disp.seg[t]]) / (SEG_LEN - 1));
    end
  end

  function automatic logic near(pt_t m, logic [9:0] px, logic [9:0] py);
    return (int'(px) + 5 >= int'(m.x)) && (int'(px) <= int'(m.x) + 5) &&
           (int'(py) + 5 >= int'(m.y)) && (int'(py) <= int'(m.y) + 5);
  endfunction

  logic [11:0] colour;
  always_comb begin
    colour = C_BG;
    for (int i = 0; i < NR; i++)
      if (in_rect(PIECE[i], x, y)) colour = seg_colour(PIECE_SEG[i], disp, frames[4]);
    if (near(mark[TRAIN_A], x, y)) colour = C_A;
    if (near(mark[TRAIN_B], x, y)) colour = C_B;
    for (int i = 0; i < NUM_SENSORS; i++)
      if (in_rect(SENS[i], x, y)) colour = disp.sensors[i] ? C_SENS1 : C_SENS0;
    for (int i = 0; i < NUM_SWITCHES; i++)
      if (in_rect(SWR[i], x, y)) colour = disp.sw[i] ? C_SW_IN : C_SW_OUT;
    if (!vis) colour = 12'h000;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      hsync     <= 1'b1;
      vsync     <= 1'b1;
      {r, g, b} <= '0;
    end else begin
      hsync     <= hs_n;
      vsync     <= vs_n;
      {r, g, b} <= colour;
    end
  end
endmodule
