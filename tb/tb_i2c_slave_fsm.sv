// tb_i2c_slave_fsm: checks the seven-state slave state machine on its own.
//
// The testbench plays the bus at the level of the indicator signals: it
// drives the SDA level (wired-AND with the machine's sda_drive_low) and
// one-cycle scl_rise, scl_fall, start and stop strobes, as i2c_bus_sync would.
// A behavioural register file answers tx_byte from byte_idx. With 4 receive
// and 3 transmit bytes it runs writes, a 5-byte write (NACK on the 5th), reads
// with master NACK and past the end, a foreign address, a repeated START,
// STOP inside a write and a read byte, and a bus_error while the machine
// holds SDA low. Every state change is checked against the transition list
// of the state diagram, and each of its 13 arrows must be taken at least once.
module tb_i2c_slave_fsm;
  import i2c_slave_pkg::*;

  localparam int         NRX  = 4;
  localparam int         NTX  = 3;
  localparam logic [6:0] ADDR = 7'h51;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             reset, bus_error;
  logic             m_sda, rise, fall, st, sp;
  i2c_cond_t        cond;
  logic [7:0]       tx_byte, rx_byte;
  logic             snapshot, rx_we, sda_drive_low, busy, xfer_done;
  logic [IDX_W-1:0] byte_idx;
  i2c_state_e       state;
  logic [7:0]       tx_mem[NTX];

  always_comb begin
    cond          = '0;
    cond.sda      = m_sda & ~sda_drive_low;
    cond.scl      = 1'b0;
    cond.scl_rise = rise;
    cond.scl_fall = fall;
    cond.start    = st;
    cond.stop     = sp;
  end
  assign tx_byte = (byte_idx < NTX) ? tx_mem[byte_idx] : 8'hFF;

  i2c_slave_fsm #(.NUM_RX_BYTES(NRX), .NUM_TX_BYTES(NTX)) dut (
    .clk(clk), .reset(reset), .cond(cond), .bus_error(bus_error), .address(ADDR),
    .tx_byte(tx_byte), .snapshot(snapshot), .rx_we(rx_we), .rx_byte(rx_byte),
    .byte_idx(byte_idx), .sda_drive_low(sda_drive_low), .busy(busy),
    .xfer_done(xfer_done), .state(state)
  );

  int checks = 0, failures = 0;
  int n_done = 0, n_snap = 0;
  logic [7:0] rx_log[$];
  int         rx_idx_log[$];
  bit         edge_seen[7][7];
  bit         edge_ok[7][7];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // transition monitor and event logs
  i2c_state_e prev_state;
  always @(posedge clk) begin
    if (!reset) begin
      if (rx_we) begin rx_log.push_back(rx_byte); rx_idx_log.push_back(int'(byte_idx)); end
      if (xfer_done) n_done++;
      if (snapshot) n_snap++;
    end
  end
  always @(negedge clk) begin
    if (!reset && state != prev_state) begin
      check(edge_ok[prev_state][state], $sformatf("transition %s -> %s not in the diagram",
                                                  prev_state.name(), state.name()));
      edge_seen[prev_state][state] = 1'b1;
    end
    prev_state = state;
  end

  task automatic pulse(ref logic s);
    s = 1'b1; @(negedge clk); s = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  // one SCL clock with master level b; returns the bus level at the rising edge
  task automatic clk_bit(input logic b, output logic bus);
    m_sda = b; repeat (3) @(negedge clk);
    bus = cond.sda;
    pulse(rise);
    pulse(fall);
  endtask

  task automatic start_c(); m_sda = 1'b1; repeat (2) @(negedge clk); pulse(st); endtask
  task automatic stop_c();  pulse(sp); m_sda = 1'b1; endtask

  task automatic send_byte(input logic [7:0] v, output logic acked);
    logic bus;
    for (int i = 7; i >= 0; i--) clk_bit(v[i], bus);
    clk_bit(1'b1, bus);
    acked = ~bus;
  endtask

  task automatic recv_byte(output logic [7:0] v, input logic ack);
    logic bus;
    for (int i = 7; i >= 0; i--) begin clk_bit(1'b1, bus); v[i] = bus; end
    clk_bit(~ack, bus);
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic a, bus;
  logic [7:0] v;
  int done0;

  initial begin
    edge_ok[ST_NON_ACTIVE][ST_GET_ADDRESS] = 1;
    edge_ok[ST_GET_ADDRESS][ST_NON_ACTIVE] = 1;
    edge_ok[ST_GET_ADDRESS][ST_SEND_ACK]   = 1;
    edge_ok[ST_SEND_ACK][ST_NON_ACTIVE]    = 1;
    edge_ok[ST_SEND_ACK][ST_DIRECTION]     = 1;
    edge_ok[ST_DIRECTION][ST_READ]         = 1;
    edge_ok[ST_DIRECTION][ST_WRITE]        = 1;
    edge_ok[ST_READ][ST_SEND_ACK]          = 1;
    edge_ok[ST_READ][ST_NON_ACTIVE]        = 1;
    edge_ok[ST_WRITE][ST_DETECT_ACK]       = 1;
    edge_ok[ST_WRITE][ST_NON_ACTIVE]       = 1;
    edge_ok[ST_DETECT_ACK][ST_DIRECTION]   = 1;
    edge_ok[ST_DETECT_ACK][ST_NON_ACTIVE]  = 1;
    for (int i = 0; i < NTX; i++) tx_mem[i] = 8'($urandom);
    tx_mem[0][7] = 1'b0;  // first byte starts with a 0 bit, for the bus_error test
    reset = 1'b1; bus_error = 1'b0; m_sda = 1'b1; rise = 0; fall = 0; st = 0; sp = 0;
    prev_state = ST_NON_ACTIVE;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    repeat (3) @(negedge clk);
    check(state == ST_NON_ACTIVE && !sda_drive_low && !busy, "idle after reset");

    // foreign address
    start_c();
    send_byte({ADDR ^ 7'h40, 1'b0}, a);
    check(!a, "foreign address NACK");
    stop_c();
    check(state == ST_NON_ACTIVE, "idle after foreign address");

    // write 5 bytes: 4 stored, the 5th refused
    done0 = n_done;
    start_c();
    send_byte({ADDR, 1'b0}, a);
    check(a, "address ACK");
    for (int i = 0; i < 5; i++) begin
      send_byte(8'hA0 + 8'(i), a);
      check(a == (i < NRX), $sformatf("data byte %0d ack=%0d", i, a));
    end
    check(state == ST_NON_ACTIVE, "idle after NACK");
    stop_c();
    check(rx_log.size() == NRX, $sformatf("%0d bytes stored", rx_log.size()));
    for (int i = 0; i < NRX && i < rx_log.size(); i++)
      check(rx_log[i] == 8'hA0 + 8'(i) && rx_idx_log[i] == i, $sformatf("stored byte %0d", i));
    check(n_done == done0 + 1, "xfer_done after write");

    // write 1 byte, ended normally by STOP at the start of the next byte
    rx_log.delete(); rx_idx_log.delete();
    start_c();
    send_byte({ADDR, 1'b0}, a);
    send_byte(8'h3C, a);
    clk_bit(1'b0, bus);     // first bit of a byte that never comes
    stop_c();
    check(state == ST_NON_ACTIVE, "STOP inside a received byte");
    check(rx_log.size() == 1 && rx_log[0] == 8'h3C, "single byte stored");

    // read 2 bytes, master NACKs the second
    start_c();
    send_byte({ADDR, 1'b1}, a);
    check(a, "address ACK on read");
    check(n_snap == 1, "snapshot on read address");
    recv_byte(v, 1'b1); check(v == tx_mem[0], "read byte 0");
    recv_byte(v, 1'b0); check(v == tx_mem[1], "read byte 1");
    check(state == ST_NON_ACTIVE && !sda_drive_low, "released after master NACK");
    stop_c();

    // read past the end: master ACKs all, 4th byte is all ones
    start_c();
    send_byte({ADDR, 1'b1}, a);
    for (int i = 0; i < NTX; i++) begin recv_byte(v, 1'b1); check(v == tx_mem[i], "read all"); end
    recv_byte(v, 1'b0);
    check(v == 8'hFF, "past the end reads FF");
    stop_c();

    // write, repeated START, read
    start_c();
    send_byte({ADDR, 1'b0}, a);
    send_byte(8'h77, a);
    clk_bit(1'b1, bus);     // SCL high with SDA high, then repeated START
    start_c();
    check(state == ST_GET_ADDRESS, "repeated START reaches Get Address");
    send_byte({ADDR, 1'b1}, a);
    check(a, "address ACK after repeated START");
    recv_byte(v, 1'b0);
    check(v == tx_mem[0], "read after repeated START");
    stop_c();

    // STOP inside a transmitted byte
    start_c();
    send_byte({ADDR, 1'b1}, a);
    clk_bit(1'b1, bus); clk_bit(1'b1, bus);
    stop_c();
    check(state == ST_NON_ACTIVE && !sda_drive_low, "STOP inside a sent byte");

    // bus_error while the machine drives a 0 data bit
    start_c();
    send_byte({ADDR, 1'b1}, a);
    repeat (3) @(negedge clk);
    check(state == ST_WRITE && sda_drive_low, "driving first bit (0)");
    bus_error = 1'b1; @(negedge clk); bus_error = 1'b0;
    @(negedge clk);
    check(state == ST_NON_ACTIVE && !sda_drive_low, "bus_error releases SDA");
    stop_c();

    // every arrow of the diagram taken
    for (int f = 0; f < 7; f++)
      for (int t = 0; t < 7; t++)
        if (edge_ok[f][t]) begin
          i2c_state_e sf, stt;
          sf  = i2c_state_e'(f);
          stt = i2c_state_e'(t);
          check(edge_seen[f][t], $sformatf("arrow %s -> %s taken", sf.name(), stt.name()));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
