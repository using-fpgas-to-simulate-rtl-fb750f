// tb_train_controller: plays sensor events to the example controller and
// checks its track power and switch outputs against the intended pattern:
// the bottom stretch is held by one train at a time, a train arriving while
// the other holds it is stopped, hand-over happens at the release sensors,
// A is preferred, and a sensor that stays high counts only once. A second,
// counter-clockwise instance must use the mirrored request and release
// sensors and drive both trains in reverse.
module tb_train_controller;
  import train_pkg::*;
  logic clk = 0, reset = 1;
  logic [NUM_SENSORS-1:0] sensors = '0;
  train_cmd_t cmd;
  logic a_waiting, b_waiting;
  logic [1:0] owner;
  int checks = 0, failures = 0;

  train_controller dut (.clk, .reset, .sensors, .cmd, .a_waiting, .b_waiting, .owner_o(owner));

  // Counter-clockwise variant, driven with its own sensor lines.
  logic [NUM_SENSORS-1:0] sensors2 = '0;
  train_cmd_t cmd2;
  logic a2, b2;
  logic [1:0] owner2;
  train_controller #(.CLOCKWISE(1'b0)) dut_ccw (.clk, .reset, .sensors(sensors2), .cmd(cmd2),
    .a_waiting(a2), .b_waiting(b2), .owner_o(owner2));

  task automatic pulse2(int s);
    @(negedge clk) sensors2[s] = 1;
    repeat (3) @(negedge clk);
    sensors2[s] = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic expect2(bit pa, bit pb, bit inner, int own, string what);
    checks++;
    if (cmd2.track[TRAIN_A] !== pa || cmd2.track[TRAIN_B] !== pb ||
        cmd2.sw[SW_BL] !== inner || cmd2.sw[SW_BR] !== inner || cmd2.sw[SW_TOP] !== 1'b0 ||
        cmd2.fwd !== 2'b00 || owner2 !== 2'(own)) begin
      failures++;
      $display("FAIL: ccw %s: track=%b sw=%b fwd=%b owner=%0d", what, cmd2.track, cmd2.sw, cmd2.fwd, owner2);
    end
  endtask

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(int s);
    @(negedge clk) sensors[s] = 1;
    repeat (3) @(negedge clk);
    sensors[s] = 0;
    repeat (2) @(negedge clk);
  endtask

  // power A, power B, bottom switches inside, owner (0 none, 1 A, 2 B)
  task automatic expect_state(bit pa, bit pb, bit inner, int own, string what);
    checks++;
    if (cmd.track[TRAIN_A] !== pa || cmd.track[TRAIN_B] !== pb ||
        cmd.sw[SW_BL] !== inner || cmd.sw[SW_BR] !== inner || cmd.sw[SW_TOP] !== 1'b0 ||
        cmd.fwd !== 2'b11 || owner !== 2'(own)) begin
      failures++;
      $display("FAIL: %s: track=%b sw=%b fwd=%b owner=%0d", what, cmd.track, cmd.sw, cmd.fwd, owner);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    @(negedge clk);
    expect_state(1, 1, 0, 0, "after reset");
    pulse(SEG_OUTER_L);           // A passes OUTER_L without holding: no effect
    expect_state(1, 1, 0, 0, "stray release ignored");
    pulse(SEG_INNER);             // B asks, bottom free
    expect_state(1, 1, 1, 2, "B holds bottom");
    pulse(SEG_OUTER_R);           // A asks while B holds
    expect_state(0, 1, 1, 2, "A stopped");
    checks++; if (!a_waiting || b_waiting) begin failures++; $display("FAIL: wait flags"); end
    pulse(SEG_BOTTOM);            // bottom sensor is not used for decisions
    expect_state(0, 1, 1, 2, "bottom sensor ignored");
    pulse(SEG_INNER);             // B clear, A preferred
    expect_state(1, 0, 0, 1, "handed to A, B stopped");
    pulse(SEG_OUTER_L);           // A clear, waiting B gets it
    expect_state(1, 1, 1, 2, "handed to B");
    pulse(SEG_INNER);             // B clear and asks again, nobody waiting
    expect_state(1, 1, 1, 2, "B keeps bottom");
    // Held sensor: one event only.
    @(negedge clk) sensors[SEG_INNER] = 1;
    repeat (10) @(negedge clk);
    expect_state(1, 1, 1, 2, "held INNER sensor");
    sensors[SEG_INNER] = 0;
    repeat (2) @(negedge clk);
    pulse(SEG_OUTER_R);
    expect_state(0, 1, 1, 2, "A waits again");
    pulse(SEG_INNER);
    expect_state(1, 0, 0, 1, "A gets it again");
    pulse(SEG_OUTER_L);
    expect_state(1, 1, 1, 2, "B again");
    pulse(SEG_INNER);             // release to nobody is impossible for B; A path:
    pulse(SEG_OUTER_R);
    pulse(SEG_INNER);
    pulse(SEG_OUTER_L);           // A clear, B was waiting
    expect_state(1, 1, 1, 2, "round trip");

    // Counter-clockwise: A asks at OUTER_L and releases at OUTER_R.
    expect2(1, 1, 0, 0, "ccw after reset");
    pulse2(SEG_OUTER_R);
    expect2(1, 1, 0, 0, "ccw: OUTER_R is not a request");
    pulse2(SEG_INNER);
    expect2(1, 1, 1, 2, "ccw: B holds");
    pulse2(SEG_OUTER_L);
    expect2(0, 1, 1, 2, "ccw: A waits at OUTER_L");
    pulse2(SEG_INNER);
    expect2(1, 0, 0, 1, "ccw: handed to A");
    pulse2(SEG_OUTER_L);
    expect2(1, 0, 0, 1, "ccw: OUTER_L again does not release");
    pulse2(SEG_OUTER_R);
    expect2(1, 1, 1, 2, "ccw: A clear at OUTER_R, B gets it");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
