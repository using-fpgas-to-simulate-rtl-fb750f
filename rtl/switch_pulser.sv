// switch_pulser: drives the two coils of each remote track switch.
//
// The controller's switch outputs are levels. Each clock the pulser compares
// them with the value it saw last; on a rising edge it drives the switch's
// "inside" coil, on a falling edge its "outside" coil, for PULSE_MS
// milliseconds (100 ms, as the source specifies). A change that arrives while
// a pulse is running ends that pulse and starts one for the new coil. After
// reset the remembered value is 0 (outside), so a switch that the
// controller wants inside receives a pulse right away; that reset behaviour
// is this design's choice. Outputs are registered and active high; an
// external driver switches +12 V onto the coil.
module switch_pulser #(
  parameter int unsigned CLK_HZ   = 25_000_000,
  parameter int unsigned PULSE_MS = 100,
  parameter int unsigned NUM_SW   = 3
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [NUM_SW-1:0] sw,
  output logic [NUM_SW-1:0] sw_inside,
  output logic [NUM_SW-1:0] sw_outside
);
  localparam longint unsigned PULSE_CYCLES = longint'(CLK_HZ) * PULSE_MS / 1000;
  localparam int unsigned CW = $clog2(PULSE_CYCLES + 1);

  logic [NUM_SW-1:0] last;
  logic [CW-1:0]     remain [NUM_SW];

  for (genvar i = 0; i < NUM_SW; i++) begin : g_sw
    always_ff @(posedge clk) begin
      if (reset) begin
        last[i]       <= 1'b0;
        remain[i]     <= '0;
        sw_inside[i]  <= 1'b0;
        sw_outside[i] <= 1'b0;
      end else if (sw[i] != last[i]) begin
        last[i]       <= sw[i];
        remain[i]     <= CW'(PULSE_CYCLES - 1);
        sw_inside[i]  <= sw[i];
        sw_outside[i] <= ~sw[i];
      end else if (remain[i] != '0) begin
        remain[i] <= remain[i] - 1'b1;
      end else begin
        sw_inside[i]  <= 1'b0;
        sw_outside[i] <= 1'b0;
      end
    end

    // Never both coils of one switch at once.
    a_one_coil: assert property (@(posedge clk) disable iff (reset)
                                 !(sw_inside[i] && sw_outside[i]));
  end
endmodule
