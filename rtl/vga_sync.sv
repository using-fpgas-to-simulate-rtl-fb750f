// vga_sync: 640x480 at 60 Hz VGA timing.
//
// Counts pixels (800 per line: 640 visible, 16 front porch, 96 sync,
// 48 back porch) and lines (525 per frame: 480 visible, 10, 2, 33). With a
// 25 MHz pixel clock this gives about 31.25 kHz lines and 59.5 Hz frames.
// The sync pulses are active low. x/y and `visible` are combinational from
// the counters; `frame_start` is high for the first pixel of each frame.
module vga_sync #(
  parameter int unsigned H_VIS = 640, H_FP = 16, H_SYNC = 96, H_BP = 48,
  parameter int unsigned V_VIS = 480, V_FP = 10, V_SYNC = 2,  V_BP = 33
) (
  input  logic       clk,
  input  logic       reset,
  output logic [9:0] x,
  output logic [9:0] y,
  output logic       visible,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       frame_start
);
  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk) begin
    if (reset) begin
      x <= '0;
      y <= '0;
    end else if (x == 10'(H_TOT - 1)) begin
      x <= '0;
      y <= (y == 10'(V_TOT - 1)) ? '0 : y + 10'd1;
    end else begin
      x <= x + 10'd1;
    end
  end

  assign visible     = (x < 10'(H_VIS)) && (y < 10'(V_VIS));
  assign hsync_n     = !((x >= 10'(H_VIS + H_FP)) && (x < 10'(H_VIS + H_FP + H_SYNC)));
  assign vsync_n     = !((y >= 10'(V_VIS + V_FP)) && (y < 10'(V_VIS + V_FP + V_SYNC)));
  assign frame_start = (x == '0) && (y == '0);
endmodule
