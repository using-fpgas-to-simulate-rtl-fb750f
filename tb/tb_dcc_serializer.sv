// tb_dcc_serializer: takes bits from dcc_serializer with random gaps and
// compares them with the expected NMRA framing built here: 14 preamble ones,
// 0, address, 0, instruction, 0, check, 1, the two trains' packets in turn.
// A command changed in the middle of a packet must appear from that train's
// next packet on, not in the one being sent.
module tb_dcc_serializer;
  import train_pkg::*;
  logic clk = 0, reset = 1;
  dcc_pkt_t [1:0] pkts;
  logic take = 0, bit_out, pkt_start;
  logic [1:0] cur;
  int checks = 0, failures = 0;

  dcc_serializer #(.PREAMBLE(14), .NUM_CMDS(2)) dut (.clk, .reset, .pkts, .take, .bit_out, .pkt_start, .cur);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [41:0] expect_bits(dcc_pkt_t p);
    return {14'h3FFF, 1'b0, p.addr, 1'b0, p.instr, 1'b0, p.check, 1'b1};
  endfunction

  // Take one bit, after a random gap.
  task automatic get_bit(output logic b, output logic st);
    repeat ($urandom_range(0, 3)) @(negedge clk);
    b = bit_out; st = pkt_start;
    take = 1;
    @(negedge clk) take = 0;
  endtask

  task automatic get_packet(input int who, input dcc_pkt_t p, input bit change_mid,
                            input dcc_pkt_t newp);
    logic [41:0] e, g;
    logic b, st;
    e = expect_bits(p);
    checks++;
    if (cur != 2'(who)) begin failures++; $display("FAIL: expected train %0d, got %0d", who, cur); end
    for (int i = 41; i >= 0; i--) begin
      get_bit(b, st);
      g[i] = b;
      if (i == 41 && !st) begin failures++; $display("FAIL: pkt_start missing"); end
      if (change_mid && i == 20) pkts[who] = newp;
    end
    checks++;
    if (g !== e) begin failures++; $display("FAIL: train %0d packet %h expected %h", who, g, e); end
  endtask

  initial begin
    dcc_pkt_t a, b, a2;
    a  = '{8'h03, 8'h6A, 8'h03 ^ 8'h6A};
    b  = '{8'h04, 8'h45, 8'h04 ^ 8'h45};
    a2 = '{8'h03, 8'h4F, 8'h03 ^ 8'h4F};
    pkts[0] = a; pkts[1] = b;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    // The first packet was captured at reset; drop it and resync.
    pkts[0] = a;
    get_packet(0, a, 0, a);
    get_packet(1, b, 0, b);
    get_packet(0, a, 1, a2);   // change during this packet
    get_packet(1, b, 0, b);
    get_packet(0, a2, 0, a2);  // new command from here on
    get_packet(1, b, 0, b);
    get_packet(0, a2, 0, a2);  // and repeated
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
