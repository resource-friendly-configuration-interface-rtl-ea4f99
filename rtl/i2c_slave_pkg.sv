// i2c_slave_pkg: types and constants shared by the I2C slave controller.
//
// i2c_state_e holds the seven states of the slave state machine. Their names
// and the set of transitions between them follow the controller's state
// diagram; the binary encoding is this design's own choice.
//
// i2c_cond_t bundles the indicator signals that i2c_bus_sync derives from the
// bus: the synchronized SDA level, one-cycle SCL edge strobes and one-cycle
// START/STOP strobes, all in the system clock domain.
package i2c_slave_pkg;

  // I2C uses 7-bit slave addresses (at most 112 usable ones on a bus).
  localparam int unsigned ADDR_W = 7;
  // Byte index width: covers transfers of up to 16 bytes plus one past the end.
  localparam int unsigned IDX_W  = 5;

  typedef enum logic [2:0] {
    ST_NON_ACTIVE  = 3'd0,  // idle, SDA released, waiting for START
    ST_GET_ADDRESS = 3'd1,  // shifting in the 7-bit address and R/W bit
    ST_SEND_ACK    = 3'd2,  // slave drives ACK (or NACK) for one SCL pulse
    ST_DIRECTION   = 3'd3,  // one-cycle decision: next byte is read or write
    ST_READ        = 3'd4,  // slave receives a data byte (master write)
    ST_WRITE       = 3'd5,  // slave transmits a data byte (master read)
    ST_DETECT_ACK  = 3'd6   // slave samples the master's ACK/NACK
  } i2c_state_e;

  typedef struct packed {
    logic sda;       // synchronized SDA level
    logic scl;       // synchronized SCL level
    logic scl_rise;  // SCL rising edge, one clk cycle
    logic scl_fall;  // SCL falling edge, one clk cycle
    logic start;     // START or repeated START: SDA fell while SCL high
    logic stop;      // STOP: SDA rose while SCL high
  } i2c_cond_t;

endpackage
