// tb_i2c_bus_watchdog: checks the stall timeout.
//
// With TIMEOUT_CYCLES = 20: busy without SCL activity must raise bus_error
// for exactly one cycle after exactly 20 cycles, and again 20 cycles later;
// SCL activity restarts the count; an idle (not busy) controller never
// times out. Expected cycle numbers are written out in the test.
module tb_i2c_bus_watchdog;

  localparam int T = 20;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset, busy, activity, bus_error;

  i2c_bus_watchdog #(.TIMEOUT_CYCLES(T)) dut (
    .clk(clk), .reset(reset), .busy(busy), .activity(activity), .bus_error(bus_error)
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // run n cycles; expect bus_error exactly in the cycles listed (1-based)
  task automatic run(input int n, input int hit1, input int hit2, input string what);
    for (int c = 1; c <= n; c++) begin
      @(negedge clk);
      check(bus_error == (c == hit1 || c == hit2),
            $sformatf("%s: cycle %0d bus_error=%0d", what, c, bus_error));
    end
  endtask

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; busy = 1'b0; activity = 1'b0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    run(3 * T, -1, -1, "idle");
    busy = 1'b1;
    run(2 * T + 5, T, 2 * T, "stalled");
    // activity every 15 cycles keeps it quiet
    busy = 1'b0; @(negedge clk); busy = 1'b1;
    for (int r = 0; r < 6; r++) begin
      run(14, -1, -1, "active");
      activity = 1'b1; @(negedge clk); activity = 1'b0;
    end
    // last activity, then stall: timeout T cycles after it
    run(T + 2, T, -1, "stall after activity");
    busy = 1'b0;
    run(T, -1, -1, "idle again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
