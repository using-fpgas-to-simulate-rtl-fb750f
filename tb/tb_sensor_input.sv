// tb_sensor_input: checks synchronisation, glitch filtering and latency of
// sensor_input with a short filter (8 clocks): an isolated pulse shorter than
// the filter must not pass, a steady level must appear after exactly
// FILTER_CYCLES + 2 clocks, and each line must be independent.
module tb_sensor_input;
  localparam int F = 8;
  logic clk = 0, reset = 1;
  logic [4:0] raw = '0, clean;
  int checks = 0, failures = 0;

  sensor_input #(.NUM(5), .FILTER_CYCLES(F)) dut (.clk, .reset, .raw, .clean);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Edges from a change of raw until clean[i] equals v (at most 100).
  task automatic edges_until(int i, bit v, output int n);
    n = 0;
    while (clean[i] !== v && n < 100) begin @(posedge clk); #1; n++; end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    repeat (3) @(negedge clk);
    check(clean == '0, "idle after reset");

    // A glitch of F-2 clocks on line 1 is filtered out.
    raw[1] = 1;
    repeat (F - 2) @(negedge clk);
    raw[1] = 0;
    repeat (3 * F) @(negedge clk);
    check(clean == '0, "short glitch rejected");

    // A steady level on line 3 passes after F+2 edges.
    raw[3] = 1;
    edges_until(3, 1'b1, n);
    check(n == F + 2, $sformatf("rise latency %0d, expected %0d", n, F + 2));
    check(clean == 5'b01000, "only line 3 high");
    @(negedge clk) raw[3] = 0;
    edges_until(3, 1'b0, n);
    check(n == F + 2, $sformatf("fall latency %0d", n));

    // Several lines at once, with one line flickering before settling.
    @(negedge clk) raw = 5'b10001;
    repeat (3) @(negedge clk);
    raw[4] = 0;
    @(negedge clk) raw[4] = 1;
    repeat (F) @(negedge clk);
    check(clean[0] == 1, "line 0 high");
    check(clean[4] == 0, "line 4 still filtered after flicker");
    repeat (3) @(negedge clk);
    check(clean == 5'b10001, "lines 0 and 4 high");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
