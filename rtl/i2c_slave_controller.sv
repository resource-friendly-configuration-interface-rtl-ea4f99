// i2c_slave_controller: stand-alone I2C slave used as a configuration
// interface for an FPGA, e.g. to set filter parameters in a camera.
//
// An I2C master (the camera's USB controller, a processor, ...) writes up to
// NUM_RX_BYTES bytes to this slave's 7-bit address; they appear on data_out,
// byte 0 first, and stay there as configuration registers. A master read
// returns up to NUM_TX_BYTES bytes of data_in, captured at the start of the
// read. After each transfer that moved data, irq (the interrupt signal) pulses for one clk
// cycle, so a processor, if one is attached, knows to look; without one,
// data_out drives the user logic directly. No microcontroller is needed.
//
// Inside: i2c_bus_sync brings SCL and SDA into the clk domain and makes the
// indicator signals (SCL edges, START, STOP); i2c_slave_fsm is the
// seven-state slave state machine; i2c_data_regs holds the output and input
// registers; i2c_bus_watchdog restarts the state machine when a transfer
// stalls, so the slave never blocks the bus.
//
// Pads: sda_i is the level on the SDA pad and sda_t the tristate control of
// its output buffer, whose data input is tied to 0: sda_t = 1 releases SDA,
// sda_t = 0 pulls it low. SCL is only read (no clock stretching). Wiring only
// sda_i and leaving sda_t unconnected makes a listen-only copy that follows
// every transfer to its address without ever acknowledging, for monitoring a
// bus.
//
// Timing: clk must run at least some tens of times faster than SCL; bus
// events reach the state machine SYNC_STAGES+1 clk cycles after the pads.
// reset is synchronous and active high.
//
// The port set follows the controller's connection plan (CLK, RESET,
// Address, Data Input, Data Output, Interrupt Signal, SCL, SDA_I, SDA_T) and
// the 16-byte default transfer size follows the controller description;
// widths, encodings and the watchdog limit are this design's choices.
module i2c_slave_controller
  import i2c_slave_pkg::*;
#(
  parameter int unsigned NUM_RX_BYTES   = 16,
  parameter int unsigned NUM_TX_BYTES   = 16,
  parameter int unsigned SYNC_STAGES    = 2,
  parameter int unsigned TIMEOUT_CYCLES = 1_000_000
) (
  input  logic                         clk,
  input  logic                         reset,
  input  logic [ADDR_W-1:0]            address,
  input  logic [NUM_TX_BYTES-1:0][7:0] data_in,
  output logic [NUM_RX_BYTES-1:0][7:0] data_out,
  output logic                         irq,
  input  logic                         scl,
  input  logic                         sda_i,
  output logic                         sda_t
);

  i2c_cond_t        cond;
  logic             bus_error;
  logic             snapshot, rx_we, sda_drive_low, busy;
  logic [7:0]       rx_byte, tx_byte;
  logic [IDX_W-1:0] byte_idx;

  i2c_bus_sync #(
    .SYNC_STAGES(SYNC_STAGES)
  ) u_sync (
    .clk  (clk),
    .reset(reset),
    .scl  (scl),
    .sda  (sda_i),
    .cond (cond)
  );

  i2c_bus_watchdog #(
    .TIMEOUT_CYCLES(TIMEOUT_CYCLES)
  ) u_watchdog (
    .clk      (clk),
    .reset    (reset),
    .busy     (busy),
    .activity (cond.scl_rise | cond.scl_fall),
    .bus_error(bus_error)
  );

  i2c_slave_fsm #(
    .NUM_RX_BYTES(NUM_RX_BYTES),
    .NUM_TX_BYTES(NUM_TX_BYTES)
  ) u_fsm (
    .clk          (clk),
    .reset        (reset),
    .cond         (cond),
    .bus_error    (bus_error),
    .address      (address),
    .tx_byte      (tx_byte),
    .snapshot     (snapshot),
    .rx_we        (rx_we),
    .rx_byte      (rx_byte),
    .byte_idx     (byte_idx),
    .sda_drive_low(sda_drive_low),
    .busy         (busy),
    .xfer_done    (irq),
    .state        ()
  );

  i2c_data_regs #(
    .NUM_RX_BYTES(NUM_RX_BYTES),
    .NUM_TX_BYTES(NUM_TX_BYTES)
  ) u_regs (
    .clk     (clk),
    .reset   (reset),
    .rx_we   (rx_we),
    .idx     (byte_idx),
    .rx_byte (rx_byte),
    .snapshot(snapshot),
    .data_in (data_in),
    .tx_byte (tx_byte),
    .data_out(data_out)
  );

  assign sda_t = ~sda_drive_low;

endmodule
