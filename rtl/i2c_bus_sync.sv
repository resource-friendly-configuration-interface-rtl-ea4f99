// i2c_bus_sync: synchronizer and condition detector for the I2C bus lines.
//
// SCL and SDA are asynchronous to the system clock. Each passes through a
// chain of SYNC_STAGES flip-flops, and one more register holds its previous
// value, so edges are found by comparing two settled samples. From those the
// block produces the controller's indicator signals, each a one-cycle strobe:
// SCL rising and falling edge, START (SDA falls while SCL stays high) and
// STOP (SDA rises while SCL stays high). Producing the indicators in the
// clock domain, after synchronization, follows the controller description;
// the number of stages (default 2) is this design's choice.
//
// Timing: a change on a pad shows on cond after SYNC_STAGES rising clk
// edges, and a strobe lasts one cycle; logic that registers a strobe reacts
// one edge later. The system clock must be well above
// the SCL rate (some tens of cycles per SCL phase) so that SDA changes made
// while SCL is low are never seen as START or STOP.
// SYNC_STAGES must be at least 2.
// Reset is synchronous and active high; it presets the samples to the idle
// bus level (both lines high) so no false condition follows reset.
module i2c_bus_sync
  import i2c_slave_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic      clk,
  input  logic      reset,
  input  logic      scl,
  input  logic      sda,
  output i2c_cond_t cond
);

  logic [SYNC_STAGES-1:0] scl_sync, sda_sync;
  logic scl_prev, sda_prev;
  logic scl_now, sda_now;

  assign scl_now = scl_sync[SYNC_STAGES-1];
  assign sda_now = sda_sync[SYNC_STAGES-1];

  always_ff @(posedge clk) begin
    if (reset) begin
      scl_sync <= '1;
      sda_sync <= '1;
      scl_prev <= 1'b1;
      sda_prev <= 1'b1;
    end else begin
      scl_sync <= {scl_sync[SYNC_STAGES-2:0], scl};
      sda_sync <= {sda_sync[SYNC_STAGES-2:0], sda};
      scl_prev <= scl_now;
      sda_prev <= sda_now;
    end
  end

  always_comb begin
    cond.sda      = sda_now;
    cond.scl      = scl_now;
    cond.scl_rise =  scl_now & ~scl_prev;
    cond.scl_fall = ~scl_now &  scl_prev;
    // Both SCL samples high: the clock line did not move while SDA did.
    cond.start    = scl_now & scl_prev &  sda_prev & ~sda_now;
    cond.stop     = scl_now & scl_prev & ~sda_prev &  sda_now;
  end

endmodule
