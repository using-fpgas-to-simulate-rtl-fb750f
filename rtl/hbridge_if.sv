// hbridge_if: turns the DCC bit stream into the bipolar track signal.
//
// For every bit the H-bridge DIR input is driven high for one half period
// and low for a second, equal half period, so the track voltage crosses zero
// twice per bit. A 1 uses a short half period (HALF1_US, 58 us) and a 0 a
// long one (HALF0_US, 100 us); whole bits of 116 us and 200 us fall inside
// the ranges the source gives for a 1 (110-190 us) and a 0 (190 us-12 ms).
// The exact values are this design's choice. PWM is held high so the bridge
// always drives the rails (the locomotives draw their power from the DCC
// signal), and BRAKE is held low; this pin use follows the LMD18200 data.
//
// Handshake with the serializer: `take` pulses for one clock when bit_in is
// captured at the start of a bit; the bit then lasts 2*HALF clocks.
module hbridge_if #(
  parameter int unsigned CLK_HZ   = 25_000_000,
  parameter int unsigned HALF1_US = 58,
  parameter int unsigned HALF0_US = 100
) (
  input  logic clk,
  input  logic reset,
  input  logic bit_in,
  output logic take,
  output logic hb_dir,
  output logic hb_pwm,
  output logic hb_brake
);
  localparam longint unsigned HALF1 = longint'(CLK_HZ) * HALF1_US / 1_000_000;
  localparam longint unsigned HALF0 = longint'(CLK_HZ) * HALF0_US / 1_000_000;
  localparam int unsigned CW = $clog2(HALF0 + 1);

  typedef enum logic [1:0] {S_IDLE, S_HIGH, S_LOW} state_e;
  state_e        state;
  logic          cur_bit;
  logic [CW-1:0] cnt;

  function automatic logic [CW-1:0] half_of(logic b);
    return b ? CW'(HALF1 - 1) : CW'(HALF0 - 1);
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      state   <= S_IDLE;
      cur_bit <= 1'b1;
      cnt     <= '0;
      take    <= 1'b0;
      hb_dir  <= 1'b0;
      hb_pwm  <= 1'b0;
    end else begin
      take   <= 1'b0;
      hb_pwm <= 1'b1;
      unique case (state)
        S_IDLE: begin
          cur_bit <= bit_in;
          cnt     <= half_of(bit_in);
          take    <= 1'b1;
          hb_dir  <= 1'b1;
          state   <= S_HIGH;
        end
        S_HIGH: begin
          if (cnt == '0) begin
            cnt    <= half_of(cur_bit);
            hb_dir <= 1'b0;
            state  <= S_LOW;
          end else cnt <= cnt - 1'b1;
        end
        S_LOW: begin
          if (cnt == '0) begin
            // Start the next bit straight away.
            cur_bit <= bit_in;
            cnt     <= half_of(bit_in);
            take    <= 1'b1;
            hb_dir  <= 1'b1;
            state   <= S_HIGH;
          end else cnt <= cnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign hb_brake = 1'b0;
endmodule
