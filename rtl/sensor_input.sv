// sensor_input: conditions the photointerrupter lines of the physical track.
//
// Each line passes through a two-flop synchroniser and then a filter that
// only accepts a new level once it has been stable for FILTER_CYCLES clocks
// (1 ms at 25 MHz by default), so short flickers from a passing train do
// not reach the controller as extra events. ACTIVE_LOW inverts the lines
// for sensor circuits that pull low on detection. The output is high while
// a train is seen. The filtering, its length and the polarity option are
// this design's choices; the source only says the core inputs the sensors.
// Latency from a clean input edge to the output is FILTER_CYCLES + 2 clocks.
module sensor_input #(
  parameter int unsigned NUM           = 5,
  parameter int unsigned FILTER_CYCLES = 25_000,
  parameter bit          ACTIVE_LOW    = 1'b0
) (
  input  logic           clk,
  input  logic           reset,
  input  logic [NUM-1:0] raw,
  output logic [NUM-1:0] clean
);
  localparam int unsigned CW = $clog2(FILTER_CYCLES + 1);

  logic [NUM-1:0] sync1, sync2;
  logic [CW-1:0]  cnt [NUM];

  always_ff @(posedge clk) begin
    if (reset) begin
      sync1 <= '0;
      sync2 <= '0;
    end else begin
      sync1 <= ACTIVE_LOW ? ~raw : raw;
      sync2 <= sync1;
    end
  end

  for (genvar i = 0; i < NUM; i++) begin : g_filt
    always_ff @(posedge clk) begin
      if (reset) begin
        cnt[i]   <= '0;
        clean[i] <= 1'b0;
      end else if (sync2[i] == clean[i]) begin
        cnt[i] <= '0;
      end else if (cnt[i] == CW'(FILTER_CYCLES - 1)) begin
        cnt[i]   <= '0;
        clean[i] <= sync2[i];
      end else begin
        cnt[i] <= cnt[i] + 1'b1;
      end
    end
  end
endmodule
