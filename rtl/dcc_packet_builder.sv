// dcc_packet_builder: forms the DCC command for one locomotive.
//
// Speed step, direction and track power from the controller are combined
// into a three-byte baseline speed-and-direction packet of the NMRA DCC
// standard and held in a register, as the source describes ("created from
// these signals and then registered"). Byte layout (from the standard, not
// the source): address 0AAAAAAA; instruction 01DCSSSS with D = 1 for forward,
// C = 0, SSSS = 0000 for stop and step n (1..14) sent as n+1; check byte =
// address XOR instruction. Power off, or step 0, sends stop. Steps above 14
// are limited to 14. The packet register updates one clock after the inputs.
module dcc_packet_builder
  import train_pkg::*;
#(
  parameter logic [6:0] ADDR = 7'd3
) (
  input  logic     clk,
  input  logic     reset,
  input  speed_t   speed,
  input  logic     power,
  input  logic     fwd,
  output dcc_pkt_t pkt
);
  logic [3:0] sss;
  logic [7:0] instr;

  always_comb begin
    if (!power || speed == 4'd0) sss = 4'd0;
    else if (speed >= 4'd14)     sss = 4'd15;
    else                         sss = speed + 4'd1;
    instr = {2'b01, fwd, 1'b0, sss};
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      pkt.addr  <= {1'b0, ADDR};
      pkt.instr <= 8'b0110_0000;
      pkt.check <= {1'b0, ADDR} ^ 8'b0110_0000;
    end else begin
      pkt.addr  <= {1'b0, ADDR};
      pkt.instr <= instr;
      pkt.check <= {1'b0, ADDR} ^ instr;
    end
  end
endmodule
