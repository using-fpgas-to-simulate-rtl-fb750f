// dcc_serializer: repeats the DCC packets of all trains as one bit stream.
//
// Each packet goes out as PREAMBLE one-bits, a 0 start bit, the address
// byte, a 0, the instruction byte, a 0, the check byte and a final 1 (NMRA
// framing, MSB first). The packets of the NUM_CMDS trains are sent in turn
// and without pause, so every command is repeated until the controller
// changes it, which also keeps the track powered. A packet is copied from its
// input at the first preamble bit; a change made during a transmission is
// sent next time round.
//
// Handshake: bit_out is always valid. The consumer pulses `take` for one
// clock when it has captured bit_out; the next bit is shown on the
// following clock. `pkt_start` is high while the first preamble bit of a
// packet is shown, and `cur` says whose packet it is.
module dcc_serializer
  import train_pkg::*;
#(
  parameter int unsigned PREAMBLE = 14,
  parameter int unsigned NUM_CMDS = 2
) (
  input  logic                        clk,
  input  logic                        reset,
  input  dcc_pkt_t [NUM_CMDS-1:0]     pkts,
  input  logic                        take,
  output logic                        bit_out,
  output logic                        pkt_start,
  output logic [$clog2(NUM_CMDS+1)-1:0] cur
);
  localparam int unsigned FRAME = 28;  // start bit, 3 x (8 bits), 2 separators, end bit
  localparam int unsigned TOTAL = PREAMBLE + FRAME;
  localparam int unsigned CW    = $clog2(TOTAL + 1);

  logic [CW-1:0]    idx;    // bit number within the packet
  logic [FRAME-1:0] frame;  // framed packet, next bit at the MSB

  function automatic logic [FRAME-1:0] frame_of(dcc_pkt_t p);
    return {1'b0, p.addr, 1'b0, p.instr, 1'b0, p.check, 1'b1};
  endfunction

  assign bit_out   = (idx < CW'(PREAMBLE)) ? 1'b1 : frame[FRAME-1];
  assign pkt_start = (idx == '0);

  always_ff @(posedge clk) begin
    if (reset) begin
      idx   <= '0;
      cur   <= '0;
      frame <= frame_of(pkts[0]);
    end else if (take) begin
      if (idx == CW'(TOTAL - 1)) begin
        // Move to the next train and capture its current command.
        idx <= '0;
        if (cur == ($bits(cur))'(NUM_CMDS - 1)) begin
          cur   <= '0;
          frame <= frame_of(pkts[0]);
        end else begin
          cur   <= cur + 1'b1;
          frame <= frame_of(pkts[cur + 1'b1]);
        end
      end else begin
        idx <= idx + 1'b1;
        if (idx >= CW'(PREAMBLE)) frame <= {frame[FRAME-2:0], 1'b0};
      end
    end
  end
endmodule
