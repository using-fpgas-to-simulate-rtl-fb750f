// tb_dcc_packet_builder: compares the registered DCC packet with the NMRA
// baseline speed/direction format worked out here bit by bit: address byte
// 0AAAAAAA, instruction 01DCSSSS, check = address XOR instruction, for every
// speed step, both directions and with power off.
module tb_dcc_packet_builder;
  import train_pkg::*;
  logic clk = 0, reset = 1;
  speed_t speed = '0;
  logic power = 0, fwd = 0;
  dcc_pkt_t pkt;
  int checks = 0, failures = 0;

  dcc_packet_builder #(.ADDR(7'd5)) dut (.clk, .reset, .speed, .power, .fwd, .pkt);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ei;
    int s;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int p = 0; p < 2; p++)
      for (int d = 0; d < 2; d++)
        for (int sp = 0; sp < 16; sp++) begin
          power = p[0]; fwd = d[0]; speed = sp[3:0];
          @(negedge clk);
          // Expected: stop when power off or step 0, else step+1, max 15.
          s = (p == 0 || sp == 0) ? 0 : (sp >= 14 ? 15 : sp + 1);
          ei = 8'h40 | (d[0] ? 8'h20 : 8'h00) | 8'(s);
          checks++;
          if (pkt.addr !== 8'h05 || pkt.instr !== ei || pkt.check !== (8'h05 ^ ei)) begin
            failures++;
            $display("FAIL: p=%0d d=%0d s=%0d got %h %h %h expected 05 %h %h",
                     p, d, sp, pkt.addr, pkt.instr, pkt.check, ei, 8'h05 ^ ei);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
