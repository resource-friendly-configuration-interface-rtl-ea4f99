// tb_i2c_slave_controller: end-to-end test of the I2C slave controller at its
// default parameters (16 receive and 16 transmit bytes, 2 sync stages,
// 1,000,000-cycle watchdog).
//
// A behavioural open-drain I2C master, written as tasks, drives SCL and its
// own SDA driver at 400 kHz (125 clk cycles per SCL half period, 100 MHz
// clk). The bus SDA is the wired-AND of the master and the slave's
// tristate output. A second controller with the same address is wired
// listen-only (its sda_t is left open) and must capture every write too.
// Expected values come from the stimulus itself, not from the design.
//
// Scenarios: foreign address (NACK), 16-byte write, 17-byte write (NACK on
// the 17th), 16-byte read with data_in changed during the read (snapshot),
// read past the last byte (0xFF), write then repeated START then read, STOP
// and START in the middle of a byte (restart), a master that stops clocking
// while the slave holds SDA low (watchdog release after exactly the timeout),
// and the ACK latency of SYNC_STAGES+1 cycles. Each mechanism is counted and
// a failure is counted for any that never happened.
module tb_i2c_slave_controller;

  localparam int          NRX     = 16;
  localparam int          NTX     = 16;
  localparam int          HALF    = 125;         // SCL half period in clk cycles
  localparam int          QUART   = HALF / 2;
  localparam int          TIMEOUT = 1_000_000;   // controller default
  localparam logic [6:0]  ADDR    = 7'h3C;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 reset;
  logic                 m_scl, m_sda;
  logic                 sda_t, spy_sda_t;
  logic                 scl, sda;
  logic [NTX-1:0][7:0]  data_in;
  logic [NRX-1:0][7:0]  data_out, spy_data_out;
  logic                 irq, spy_irq;

  assign scl = m_scl;
  assign sda = m_sda & sda_t;   // open drain: spy_sda_t is not connected

  i2c_slave_controller dut (
    .clk(clk), .reset(reset), .address(ADDR), .data_in(data_in),
    .data_out(data_out), .irq(irq), .scl(scl), .sda_i(sda), .sda_t(sda_t)
  );

  i2c_slave_controller spy (
    .clk(clk), .reset(reset), .address(ADDR), .data_in(data_in),
    .data_out(spy_data_out), .irq(spy_irq), .scl(scl), .sda_i(sda), .sda_t(spy_sda_t)
  );

  int checks = 0, failures = 0;
  int n_irq = 0, irq_len = 0, max_irq_len = 0;
  int m_mismatch = 0, m_write = 0, m_overflow = 0, m_read = 0, m_snapshot = 0;
  int m_read_end = 0, m_restart = 0, m_abort = 0, m_watchdog = 0, m_eaves = 0, m_irq = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // interrupt pulses: count them and their length
  always @(posedge clk) begin
    if (reset) irq_len = 0;
    else if (irq) irq_len++;
    else if (irq_len != 0) begin
      n_irq++;
      if (irq_len > max_irq_len) max_irq_len = irq_len;
      irq_len = 0;
    end
  end

  task automatic wait_cyc(input int n);
    repeat (n) @(negedge clk);
  endtask

  // ---------------- behavioural I2C master ----------------
  task automatic i2c_start();           // from idle bus, or repeated START with SCL low
    m_sda = 1'b1; wait_cyc(QUART);
    m_scl = 1'b1; wait_cyc(HALF);
    m_sda = 1'b0; wait_cyc(HALF);
    m_scl = 1'b0; wait_cyc(QUART);
  endtask

  task automatic i2c_stop();
    m_sda = 1'b0; wait_cyc(QUART);
    m_scl = 1'b1; wait_cyc(HALF);
    m_sda = 1'b1; wait_cyc(HALF);
  endtask

  task automatic put_bit(input logic b);
    m_sda = b;    wait_cyc(QUART);
    m_scl = 1'b1; wait_cyc(HALF);
    m_scl = 1'b0; wait_cyc(QUART);
  endtask

  task automatic get_bit(output logic b);
    m_sda = 1'b1; wait_cyc(QUART);
    m_scl = 1'b1; wait_cyc(QUART);
    b = sda;      wait_cyc(HALF - QUART);
    m_scl = 1'b0; wait_cyc(QUART);
  endtask

  task automatic put_byte(input logic [7:0] v, output logic acked);
    logic a;
    for (int i = 7; i >= 0; i--) put_bit(v[i]);
    get_bit(a);
    acked = ~a;
  endtask

  task automatic get_byte(output logic [7:0] v, input logic ack);
    logic b;
    for (int i = 7; i >= 0; i--) begin get_bit(b); v[i] = b; end
    put_bit(~ack);
  endtask

  task automatic write_xfer(input int n, input logic [7:0] bytes[], output int n_acked);
    logic a;
    n_acked = 0;
    i2c_start();
    put_byte({ADDR, 1'b0}, a);
    check(a, "address ACK on write");
    for (int i = 0; i < n && a; i++) begin
      put_byte(bytes[i], a);
      if (a) n_acked++;
    end
    i2c_stop();
  endtask

  logic [7:0] wr[], rd[NTX+1];
  logic [NTX-1:0][7:0] snap;
  logic a;
  int   na, irq0, lat;

  // watchdog against a hung simulation
  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_scl = 1'b1; m_sda = 1'b1; reset = 1'b1;
    for (int i = 0; i < NTX; i++) data_in[i] = 8'($urandom);
    wait_cyc(10);
    reset = 1'b0;
    wait_cyc(10);
    check(sda_t == 1'b1, "SDA released after reset");
    check(data_out == '0, "data_out cleared by reset");

    // 1: foreign address gets no ACK, nothing stored, no interrupt
    irq0 = n_irq;
    i2c_start();
    put_byte({ADDR ^ 7'h01, 1'b0}, a);
    check(!a, "foreign address NACK");
    put_byte(8'hA5, a);
    check(!a, "data to foreign address NACK");
    i2c_stop(); wait_cyc(20);
    check(data_out == '0, "foreign write not stored");
    check(n_irq == irq0, "no interrupt for foreign address");
    if (!a) m_mismatch++;

    // 2: full 16-byte write, ACK latency measured on the address byte
    wr = new[NRX];
    foreach (wr[i]) wr[i] = 8'($urandom);
    irq0 = n_irq;
    i2c_start();
    for (int i = 7; i >= 1; i--) put_bit(ADDR[i-1]);
    // last address bit (R/W = 0) by hand, then count cycles to the ACK
    m_sda = 1'b0; wait_cyc(QUART); m_scl = 1'b1; wait_cyc(HALF); m_scl = 1'b0;
    lat = 0;
    while (sda_t && lat < 20) begin wait_cyc(1); lat++; end
    check(lat == 3, $sformatf("ACK drives SDA %0d cycles after SCL falls (expect 3)", lat));
    wait_cyc(QUART - lat);
    get_bit(a); check(!a, "address ACK seen by master");
    na = 0;
    for (int i = 0; i < NRX; i++) begin put_byte(wr[i], a); if (a) na++; end
    i2c_stop(); wait_cyc(20);
    check(na == NRX, "all 16 data bytes ACKed");
    for (int i = 0; i < NRX; i++) begin
      check(data_out[i] == wr[i], $sformatf("data_out[%0d]", i));
      check(spy_data_out[i] == wr[i], $sformatf("listen-only data_out[%0d]", i));
    end
    check(n_irq == irq0 + 1, "one interrupt after write");
    check(max_irq_len == 1, "interrupt is one cycle long");
    if (na == NRX) m_write++;
    if (n_irq == irq0 + 1) m_irq++;
    if (spy_data_out == data_out && data_out != '0) m_eaves++;

    // 3: 17-byte write: the 17th byte is refused
    wr = new[NRX + 1];
    foreach (wr[i]) wr[i] = 8'($urandom);
    write_xfer(NRX + 1, wr, na);
    wait_cyc(20);
    check(na == NRX, $sformatf("17-byte write: %0d ACKed, expect 16", na));
    for (int i = 0; i < NRX; i++) check(data_out[i] == wr[i], $sformatf("overflow write data_out[%0d]", i));
    if (na == NRX) m_overflow++;

    // 4: 16-byte read; data_in changes after the first byte must not show
    snap = data_in;
    irq0 = n_irq;
    i2c_start();
    put_byte({ADDR, 1'b1}, a);
    check(a, "address ACK on read");
    for (int i = 0; i < NTX; i++) begin
      get_byte(rd[i], i != NTX - 1);
      if (i == 0) for (int k = 0; k < NTX; k++) data_in[k] = 8'($urandom);
    end
    i2c_stop(); wait_cyc(20);
    na = 0;
    for (int i = 0; i < NTX; i++) begin
      check(rd[i] == snap[i], $sformatf("read byte %0d: %02x expect %02x", i, rd[i], snap[i]));
      if (rd[i] == snap[i]) na++;
    end
    check(n_irq == irq0 + 1, "one interrupt after read");
    check(sda_t, "SDA released after read");
    if (na == NTX) m_read++;
    if (na == NTX && snap != data_in) m_snapshot++;

    // 5: read past the last byte: master ACKs all 16, the 17th reads 0xFF
    snap = data_in;
    i2c_start();
    put_byte({ADDR, 1'b1}, a);
    for (int i = 0; i <= NTX; i++) get_byte(rd[i], i != NTX);
    i2c_stop(); wait_cyc(20);
    check(rd[NTX - 1] == snap[NTX - 1], "last byte before end");
    check(rd[NTX] == 8'hFF, "byte past end reads 0xFF");
    if (rd[NTX] == 8'hFF) m_read_end++;

    // 6: write 2 bytes, repeated START, read 2 bytes
    snap = data_in;
    irq0 = n_irq;
    i2c_start();
    put_byte({ADDR, 1'b0}, a);
    put_byte(8'h11, a);
    put_byte(8'h22, a);
    i2c_start();                     // repeated START, SCL is low here
    put_byte({ADDR, 1'b1}, a);
    check(a, "address ACK after repeated START");
    get_byte(rd[0], 1'b1);
    get_byte(rd[1], 1'b0);
    i2c_stop(); wait_cyc(20);
    check(data_out[0] == 8'h11 && data_out[1] == 8'h22, "write before repeated START");
    check(rd[0] == snap[0] && rd[1] == snap[1], "read after repeated START");
    check(n_irq == irq0 + 2, "two interrupts around repeated START");
    if (a && rd[1] == snap[1]) m_restart++;

    // 7: STOP after 3 bits of a data byte, then START after 5 bits:
    //    the slave restarts and the next transfer works
    i2c_start();
    put_byte({ADDR, 1'b0}, a);
    put_bit(1'b1); put_bit(1'b0); put_bit(1'b1);
    i2c_stop(); wait_cyc(20);
    check(sda_t, "SDA released after STOP mid-byte");
    i2c_start();
    put_byte({ADDR, 1'b0}, a);
    for (int i = 0; i < 5; i++) put_bit(1'b0);
    i2c_start();                     // START in the middle of a byte
    put_byte({ADDR, 1'b0}, a);
    check(a, "address ACK after START mid-byte");
    put_byte(8'h5A, a);
    i2c_stop(); wait_cyc(20);
    check(data_out[0] == 8'h5A && data_out[1] == 8'h22, "write after aborted transfers");
    if (data_out[0] == 8'h5A) m_abort++;

    // 8: master stops clocking while the slave drives a 0 bit
    for (int k = 0; k < NTX; k++) data_in[k] = 8'h00;
    i2c_start();
    put_byte({ADDR, 1'b1}, a);
    wait_cyc(20);
    check(!sda_t, "slave drives first data bit (0)");
    lat = 0;
    while (!sda_t && lat < TIMEOUT + 100) begin wait_cyc(1); lat++; end
    // the last SCL edge was seen 3 cycles after it happened, 20+QUART cycles ago
    check(lat + 20 >= TIMEOUT - QUART && lat + 20 <= TIMEOUT + 10,
          $sformatf("watchdog releases SDA after %0d cycles", lat + 20 + QUART));
    if (sda_t) m_watchdog++;
    m_sda = 1'b1; wait_cyc(HALF); m_scl = 1'b1; wait_cyc(HALF);
    i2c_stop(); wait_cyc(20);
    // the bus works again
    wr = new[2]; wr[0] = 8'hC3; wr[1] = 8'h3C;
    write_xfer(2, wr, na);
    wait_cyc(20);
    check(na == 2 && data_out[0] == 8'hC3 && data_out[1] == 8'h3C, "transfer after watchdog restart");
    check(spy_data_out[0] == 8'hC3, "listen-only copy follows after restart");

    // every mechanism must have happened
    check(m_mismatch > 0, "mechanism: foreign address");
    check(m_write    > 0, "mechanism: 16-byte write");
    check(m_overflow > 0, "mechanism: overflow NACK");
    check(m_read     > 0, "mechanism: 16-byte read");
    check(m_snapshot > 0, "mechanism: input snapshot");
    check(m_read_end > 0, "mechanism: read past end");
    check(m_restart  > 0, "mechanism: repeated START");
    check(m_abort    > 0, "mechanism: restart on STOP/START mid-byte");
    check(m_watchdog > 0, "mechanism: watchdog release");
    check(m_eaves    > 0, "mechanism: listen-only eavesdropping");
    check(m_irq      > 0, "mechanism: interrupt");
    $display("mechanisms: mismatch=%0d write=%0d overflow=%0d read=%0d snapshot=%0d read_end=%0d restart=%0d abort=%0d watchdog=%0d eavesdrop=%0d irq=%0d (interrupts %0d)",
             m_mismatch, m_write, m_overflow, m_read, m_snapshot, m_read_end, m_restart, m_abort, m_watchdog, m_eaves, m_irq, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
