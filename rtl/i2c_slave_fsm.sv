// i2c_slave_fsm: the seven-state state machine of the I2C slave.
//
// States and transitions follow the controller's state diagram:
//   Non-Active  -> Get Address              (START seen)
//   Get Address -> Send Ack | Non-Active    (own address | other address)
//   Send Ack    -> Direction | Non-Active   (ACK given | NACK given)
//   Direction   -> Read | Write             (R/W bit of the address byte)
//   Read        -> Send Ack                 (8 data bits received)
//   Write       -> Detect Ack               (8 data bits sent)
//   Detect Ack  -> Direction | Non-Active   (master ACK | master NACK/last byte)
// and every state with an arrow to Non-Active also takes it on a faulty
// signal: a START or STOP in the middle of a transfer, or bus_error from the
// watchdog. Direction lasts one clk cycle right after an SCL falling edge,
// when neither a bus condition nor a timeout can occur, so like the diagram it
// has no exit to Non-Active. A START seen outside Non-Active (repeated START)
// is remembered, so the machine passes through Non-Active and, one cycle
// later, on to Get Address.
//
// Bus timing: bits are sampled on SCL rising edges, and SDA is changed only
// after SCL falling edges (as the cond strobes report them), so SDA is stable
// while SCL is high. The address byte is 7 address bits, MSB first, then the
// R/W bit (1 = master reads). Received data bytes go to the output registers
// at index 0, 1, ...; a byte past NUM_RX_BYTES gets a NACK. Transmitted bytes
// come from the input registers at index 0, 1, ...; after the
// NUM_TX_BYTES-th byte, or on a master NACK, the slave goes to Non-Active
// and releases SDA. snapshot pulses when the slave acknowledges its address
// for a read, rx_we when a received byte is stored, xfer_done when the
// machine returns to Non-Active after a transfer that moved at least one
// data byte. sda_drive_low is registered.
//
// The states, their transitions and the return to Non-Active on faulty
// signals follow the controller description. The bit and byte order, the
// 16-byte limit handling by NACK, the repeated-START handling and the
// interrupt condition are this design's choices. Reset is synchronous and
// active high.
module i2c_slave_fsm
  import i2c_slave_pkg::*;
#(
  parameter int unsigned NUM_RX_BYTES = 16,
  parameter int unsigned NUM_TX_BYTES = 16
) (
  input  logic              clk,
  input  logic              reset,
  input  i2c_cond_t         cond,
  input  logic              bus_error,
  input  logic [ADDR_W-1:0] address,
  input  logic [7:0]        tx_byte,
  output logic              snapshot,
  output logic              rx_we,
  output logic [7:0]        rx_byte,
  output logic [IDX_W-1:0]  byte_idx,
  output logic              sda_drive_low,
  output logic              busy,
  output logic              xfer_done,
  output i2c_state_e        state
);

  i2c_state_e       state_d;
  logic [7:0]       shift_q, shift_d;
  logic [3:0]       bit_cnt_q, bit_cnt_d;
  logic [IDX_W-1:0] idx_q, idx_d;
  logic             rw_q, rw_d;
  logic             ack_ok_q, ack_ok_d;
  logic             got_ack_q, got_ack_d;
  logic             restart_q, restart_d;
  logic             moved_q, moved_d;
  logic             sda_low_d;
  logic             abort;

  // The byte index is IDX_W bits wide and must also hold "one past the end".
  if (NUM_RX_BYTES < 1 || NUM_RX_BYTES > 30 || NUM_TX_BYTES < 1 || NUM_TX_BYTES > 30) begin : g_size_check
    $error("i2c_slave_fsm: NUM_RX_BYTES and NUM_TX_BYTES must be 1..30");
  end

  assign busy     = (state != ST_NON_ACTIVE);
  assign byte_idx = idx_q;
  assign rx_byte  = shift_q;
  assign abort    = cond.start || cond.stop || bus_error;

  always_comb begin
    state_d   = state;
    shift_d   = shift_q;
    bit_cnt_d = bit_cnt_q;
    idx_d     = idx_q;
    rw_d      = rw_q;
    ack_ok_d  = ack_ok_q;
    got_ack_d = got_ack_q;
    restart_d = restart_q;
    moved_d   = moved_q;
    snapshot  = 1'b0;
    rx_we     = 1'b0;

    unique case (state)
      ST_NON_ACTIVE: begin
        if (cond.start || restart_q) begin
          state_d   = ST_GET_ADDRESS;
          restart_d = 1'b0;
          bit_cnt_d = '0;
          idx_d     = '0;
          moved_d   = 1'b0;
        end
      end

      ST_GET_ADDRESS: begin
        if (cond.scl_rise) begin
          shift_d   = {shift_q[6:0], cond.sda};
          bit_cnt_d = bit_cnt_q + 1'b1;
        end else if (cond.scl_fall && bit_cnt_q == 4'd8) begin
          bit_cnt_d = '0;
          if (shift_q[7:1] == address) begin
            state_d  = ST_SEND_ACK;
            rw_d     = shift_q[0];
            ack_ok_d = 1'b1;
            snapshot = shift_q[0];
          end else begin
            state_d = ST_NON_ACTIVE;
          end
        end
      end

      ST_SEND_ACK: begin
        if (cond.scl_rise) begin
          bit_cnt_d = 4'd1;
        end else if (cond.scl_fall && bit_cnt_q == 4'd1) begin
          bit_cnt_d = '0;
          state_d   = ack_ok_q ? ST_DIRECTION : ST_NON_ACTIVE;
        end
      end

      ST_DIRECTION: begin
        bit_cnt_d = '0;
        if (rw_q) begin
          state_d = ST_WRITE;
          shift_d = tx_byte;
        end else begin
          state_d = ST_READ;
        end
      end

      ST_READ: begin
        if (cond.scl_rise) begin
          shift_d   = {shift_q[6:0], cond.sda};
          bit_cnt_d = bit_cnt_q + 1'b1;
        end else if (cond.scl_fall && bit_cnt_q == 4'd8) begin
          bit_cnt_d = '0;
          state_d   = ST_SEND_ACK;
          if (32'(idx_q) < NUM_RX_BYTES) begin
            rx_we    = 1'b1;
            ack_ok_d = 1'b1;
            idx_d    = idx_q + 1'b1;
            moved_d  = 1'b1;
          end else begin
            ack_ok_d = 1'b0;
          end
        end
      end

      ST_WRITE: begin
        if (cond.scl_rise) begin
          bit_cnt_d = bit_cnt_q + 1'b1;
        end else if (cond.scl_fall) begin
          shift_d = {shift_q[6:0], 1'b1};
          if (bit_cnt_q == 4'd8) begin
            bit_cnt_d = '0;
            state_d   = ST_DETECT_ACK;
            idx_d     = idx_q + 1'b1;
            moved_d   = 1'b1;
          end
        end
      end

      ST_DETECT_ACK: begin
        if (cond.scl_rise) begin
          bit_cnt_d = 4'd1;
          got_ack_d = ~cond.sda;
        end else if (cond.scl_fall && bit_cnt_q == 4'd1) begin
          bit_cnt_d = '0;
          state_d   = (got_ack_q && 32'(idx_q) < NUM_TX_BYTES) ? ST_DIRECTION
                                                                : ST_NON_ACTIVE;
        end
      end

      default: state_d = ST_NON_ACTIVE;
    endcase

    // Faulty signal: back to Non-Active from any state that has that arrow.
    if (state != ST_NON_ACTIVE && state != ST_DIRECTION && abort) begin
      state_d   = ST_NON_ACTIVE;
      bit_cnt_d = '0;
      rx_we     = 1'b0;
      restart_d = cond.start;
    end

    sda_low_d = (state_d == ST_SEND_ACK && ack_ok_d) ||
                (state_d == ST_WRITE && !shift_d[7]);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state         <= ST_NON_ACTIVE;
      shift_q       <= '0;
      bit_cnt_q     <= '0;
      idx_q         <= '0;
      rw_q          <= 1'b0;
      ack_ok_q      <= 1'b0;
      got_ack_q     <= 1'b0;
      restart_q     <= 1'b0;
      moved_q       <= 1'b0;
      sda_drive_low <= 1'b0;
      xfer_done     <= 1'b0;
    end else begin
      state         <= state_d;
      shift_q       <= shift_d;
      bit_cnt_q     <= bit_cnt_d;
      idx_q         <= idx_d;
      rw_q          <= rw_d;
      ack_ok_q      <= ack_ok_d;
      got_ack_q     <= got_ack_d;
      restart_q     <= restart_d;
      moved_q       <= (state_d == ST_NON_ACTIVE) ? 1'b0 : moved_d;
      sda_drive_low <= sda_low_d;
      xfer_done     <= (state != ST_NON_ACTIVE) && (state_d == ST_NON_ACTIVE) && moved_d;
    end
  end

  // The slave never pulls SDA low while it is idle.
  a_idle_releases_sda: assert property (@(posedge clk) disable iff (reset)
    (state == ST_NON_ACTIVE) |-> !sda_drive_low);

  // I2C rule: the slave changes SDA only while SCL is low, except when it
  // lets go of the bus on a fault.
  a_sda_changes_with_scl_low: assert property (@(posedge clk) disable iff (reset)
    $changed(sda_drive_low) |-> (!$past(cond.scl) || $past(abort)));

  // Data bytes are stored only inside the output register range.
  a_rx_in_range: assert property (@(posedge clk) disable iff (reset)
    rx_we |-> (32'(idx_q) < NUM_RX_BYTES));

endmodule
