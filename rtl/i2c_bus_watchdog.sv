// i2c_bus_watchdog: restarts the slave when a transfer stalls.
//
// While the slave state machine is busy (any state but Non-Active) the block
// counts system clock cycles since the last SCL edge. If TIMEOUT_CYCLES pass
// without one, it raises bus_error for one cycle; the state machine then goes
// back to Non-Active and releases SDA. This keeps the slave from holding SDA
// low for ever when a master stops mid-transfer, a line is disconnected or
// the bus carries signals that do not follow the protocol. That the
// controller restarts itself on errors and never blocks the bus follows the
// controller description; detecting a stall with a cycle counter, and the
// default limit of 1,000,000 cycles (10 ms at 100 MHz, well above any SCL
// phase of a 100 kHz bus), are this design's choices.
//
// Timing: with busy high and activity low from cycle 0, bus_error is high in
// the cycle after the TIMEOUT_CYCLES-th such cycle and for that one cycle; the
// count then starts again. activity or a low busy clears the count.
module i2c_bus_watchdog #(
  parameter int unsigned TIMEOUT_CYCLES = 1_000_000
) (
  input  logic clk,
  input  logic reset,
  input  logic busy,      // state machine outside Non-Active
  input  logic activity,  // SCL edge strobe
  output logic bus_error  // one-cycle restart request
);

  localparam int unsigned CNT_W = $clog2(TIMEOUT_CYCLES + 1);

  logic [CNT_W-1:0] count;

  always_ff @(posedge clk) begin
    if (reset) begin
      count     <= '0;
      bus_error <= 1'b0;
    end else if (!busy || activity) begin
      count     <= '0;
      bus_error <= 1'b0;
    end else if (count == CNT_W'(TIMEOUT_CYCLES - 1)) begin
      count     <= '0;
      bus_error <= 1'b1;
    end else begin
      count     <= count + 1'b1;
      bus_error <= 1'b0;
    end
  end

endmodule
