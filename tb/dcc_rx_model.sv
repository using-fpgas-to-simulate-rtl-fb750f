// dcc_rx_model: behavioural DCC decoder, as found in a locomotive, for
// testbenches only (not synthesizable intent; no delays needed).
//
// It watches the H-bridge DIR line, measures every half period in clocks and
// calls a half shorter than THRESH clocks a 1, longer a 0. A bit is a high
// half followed by a low half of the same kind; unequal halves count as a
// framing error. Bits are parsed as NMRA packets: at least MIN_PRE one-bits,
// a 0, then bytes each followed by a 0 (more to come) or a 1 (end). For
// every packet it pulses `valid` with the first three bytes and sets `ok`
// when the XOR of all bytes is zero. Half-period lengths seen are kept in
// min/max registers for timing checks.
module dcc_rx_model #(
  parameter int THRESH  = 80,
  parameter int MIN_PRE = 10
) (
  input  logic       clk,
  input  logic       dir,
  output logic       valid,
  output logic       ok,
  output logic [7:0] b0, b1, b2,
  output int         nbytes,
  output int         frame_errors,
  output int         min_half1, max_half1, min_half0, max_half0
);
  int   cnt = 0, h_high = 0, h_low = 0;
  logic last = 0;
  int   started = 0;  // rising edges seen; the first bit after power-up is dropped

  typedef enum {P_PRE, P_BYTE, P_SEP} pstate_e;
  pstate_e ps = P_PRE;
  int ones = 0, nb = 0, bitn = 0;
  logic [7:0] cur, acc_x;
  logic [7:0] bytes [3];

  initial begin
    valid = 0; ok = 0; b0 = 0; b1 = 0; b2 = 0; nbytes = 0; frame_errors = 0;
    min_half1 = 1 << 30; max_half1 = 0; min_half0 = 1 << 30; max_half0 = 0;
    cur = 0; acc_x = 0;
  end

  task automatic note_half(int h);
    if (h < THRESH) begin
      if (h < min_half1) min_half1 = h;
      if (h > max_half1) max_half1 = h;
    end else begin
      if (h < min_half0) min_half0 = h;
      if (h > max_half0) max_half0 = h;
    end
  endtask

  task automatic take_bit(logic bv);
    case (ps)
      P_PRE: begin
        if (bv) ones++;
        else if (ones >= MIN_PRE) begin ps = P_BYTE; nb = 0; bitn = 0; acc_x = 0; end
        else ones = 0;
      end
      P_BYTE: begin
        cur = {cur[6:0], bv};
        bitn++;
        if (bitn == 8) begin
          if (nb < 3) bytes[nb] = cur;
          acc_x ^= cur;
          nb++;
          bitn = 0;
          ps = P_SEP;
        end
      end
      P_SEP: begin
        if (!bv) ps = P_BYTE;
        else begin
          valid  <= 1;
          ok     <= (acc_x == 0);
          b0     <= bytes[0]; b1 <= bytes[1]; b2 <= bytes[2];
          nbytes <= nb;
          ps = P_PRE;
          ones = 1;  // the end bit may start the next preamble
        end
      end
    endcase
  endtask

  always @(posedge clk) begin
    valid <= 0;
    cnt++;
    if (dir != last) begin
      if (dir) begin
        // Rising edge: the previous bit is complete.
        h_low = cnt;
        if (started >= 2) begin
          note_half(h_high);
          note_half(h_low);
          if ((h_high < THRESH) != (h_low < THRESH)) frame_errors++;
          else take_bit(h_high < THRESH);
        end
        started++;
      end else begin
        h_high = cnt;
      end
      cnt = 0;
    end
    last = dir;
  end
endmodule
