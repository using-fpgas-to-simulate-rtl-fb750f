// tb_hbridge_if: feeds a random bit sequence through hbridge_if at a 1 MHz
// clock (one clock per microsecond) and checks, with the DCC decoder model,
// that every bit comes back in order, that a 1 has two 58 us halves and a 0
// two 100 us halves (whole bits inside 110-190 us and 190 us-12 ms), and
// that PWM stays high and BRAKE low.
module tb_hbridge_if;
  logic clk = 0, reset = 1;
  logic bit_in, take, hb_dir, hb_pwm, hb_brake;
  int checks = 0, failures = 0;
  localparam int N = 300;
  logic [N-1:0] seq;
  int sent = 0, got = 0;

  hbridge_if #(.CLK_HZ(1_000_000)) dut (.clk, .reset, .bit_in, .take, .hb_dir, .hb_pwm, .hb_brake);

  always #5 clk = ~clk;

  // Bits offered to the interface; advance on take.
  assign bit_in = (sent < N) ? seq[sent] : 1'b1;
  always @(posedge clk) if (!reset && take) sent <= sent + 1;

  // Measure each half period directly.
  int cnt = 0, half_no = 0;
  logic last_dir = 0;
  logic [N-1:0] rx;
  int hh = 0;
  always @(posedge clk) begin
    if (!reset) begin
      cnt++;
      if (hb_dir != last_dir) begin
        if (half_no > 0) begin
          // half_no odd: a high half just ended; even: a low half ended.
          int bidx;
          bidx = (half_no - 1) / 2;
          if (bidx < N) begin
            checks++;
            if (cnt != (seq[bidx] ? 58 : 100)) begin
              failures++;
              $display("FAIL: bit %0d (%0b) half %0d lasted %0d clocks", bidx, seq[bidx], half_no, cnt);
            end
            if (half_no % 2 == 0) rx[bidx] = (hh == 58) && (cnt == 58) ? 1'b1 : 1'b0;
            hh = cnt;
          end
        end
        half_no++;
        cnt = 0;
      end
      last_dir <= hb_dir;
      if (sent > 0 && (hb_pwm !== 1'b1 || hb_brake !== 1'b0)) begin
        failures++;
        $display("FAIL: pwm/brake %b%b", hb_pwm, hb_brake);
      end
    end
  end

  initial begin
    #(N * 250 * 1000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) seq[i] = $urandom_range(0, 1);
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    wait (sent == N);
    repeat (300) @(posedge clk);
    checks++;
    if (rx[N-2:0] !== seq[N-2:0]) begin
      failures++;
      $display("FAIL: bit sequence differs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
