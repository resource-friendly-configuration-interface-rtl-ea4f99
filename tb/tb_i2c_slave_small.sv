// tb_i2c_slave_small: the controller in its smallest configuration, one
// receive and one transmit byte, as used when a single setting is enough.
//
// A behavioural open-drain master at 400 kHz (clk 100 MHz) writes 2 bytes
// (the second must get a NACK and leave the register alone), reads 2 bytes
// (the first is the input register, the second 0xFF), and reads with a
// repeated START after a write. A short watchdog limit (2,000 cycles) is
// checked by stopping SCL while the slave drives a 0 bit.
module tb_i2c_slave_small;

  localparam int         HALF  = 125;
  localparam int         QUART = HALF / 2;
  localparam int         TO    = 2000;
  localparam logic [6:0] ADDR  = 7'h12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic            reset, m_scl, m_sda, sda_t, sda, irq;
  logic [0:0][7:0] data_in, data_out;

  assign sda = m_sda & sda_t;

  i2c_slave_controller #(
    .NUM_RX_BYTES(1), .NUM_TX_BYTES(1), .TIMEOUT_CYCLES(TO)
  ) dut (
    .clk(clk), .reset(reset), .address(ADDR), .data_in(data_in),
    .data_out(data_out), .irq(irq), .scl(m_scl), .sda_i(sda), .sda_t(sda_t)
  );

  int checks = 0, failures = 0, n_irq = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  always @(posedge clk) if (!reset && irq) n_irq++;

  task automatic wait_cyc(input int n); repeat (n) @(negedge clk); endtask
  task automatic i2c_start();
    m_sda = 1'b1; wait_cyc(QUART); m_scl = 1'b1; wait_cyc(HALF);
    m_sda = 1'b0; wait_cyc(HALF);  m_scl = 1'b0; wait_cyc(QUART);
  endtask
  task automatic i2c_stop();
    m_sda = 1'b0; wait_cyc(QUART); m_scl = 1'b1; wait_cyc(HALF); m_sda = 1'b1; wait_cyc(HALF);
  endtask
  task automatic put_bit(input logic b);
    m_sda = b; wait_cyc(QUART); m_scl = 1'b1; wait_cyc(HALF); m_scl = 1'b0; wait_cyc(QUART);
  endtask
  task automatic get_bit(output logic b);
    m_sda = 1'b1; wait_cyc(QUART); m_scl = 1'b1; wait_cyc(QUART);
    b = sda; wait_cyc(HALF - QUART); m_scl = 1'b0; wait_cyc(QUART);
  endtask
  task automatic put_byte(input logic [7:0] v, output logic acked);
    logic a;
    for (int i = 7; i >= 0; i--) put_bit(v[i]);
    get_bit(a); acked = ~a;
  endtask
  task automatic get_byte(output logic [7:0] v, input logic ack);
    logic b;
    for (int i = 7; i >= 0; i--) begin get_bit(b); v[i] = b; end
    put_bit(~ack);
  endtask

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic a;
  logic [7:0] v0, v1;
  int lat;

  initial begin
    m_scl = 1'b1; m_sda = 1'b1; reset = 1'b1; data_in[0] = 8'h96;
    wait_cyc(10); reset = 1'b0; wait_cyc(10);

    i2c_start();
    put_byte({ADDR, 1'b0}, a); check(a, "address ACK");
    put_byte(8'h5E, a);        check(a, "first byte ACK");
    put_byte(8'hE5, a);        check(!a, "second byte NACK");
    i2c_stop(); wait_cyc(20);
    check(data_out[0] == 8'h5E, "register keeps the first byte");
    check(n_irq == 1, $sformatf("interrupt after write (%0d)", n_irq));

    i2c_start();
    put_byte({ADDR, 1'b1}, a); check(a, "read address ACK");
    get_byte(v0, 1'b1);
    get_byte(v1, 1'b0);
    i2c_stop(); wait_cyc(20);
    check(v0 == 8'h96, "input register read");
    check(v1 == 8'hFF, "past the end reads FF");
    check(n_irq == 2, "interrupt after read");

    data_in[0] = 8'h0F;
    i2c_start();
    put_byte({ADDR, 1'b0}, a);
    put_byte(8'hA1, a);
    i2c_start();
    put_byte({ADDR, 1'b1}, a); check(a, "ACK after repeated START");
    get_byte(v0, 1'b0);
    i2c_stop(); wait_cyc(20);
    check(data_out[0] == 8'hA1 && v0 == 8'h0F, "write + repeated START + read");

    // stall with SDA held low by the slave (first data bit of 0x0F is 0)
    i2c_start();
    put_byte({ADDR, 1'b1}, a);
    wait_cyc(10);
    check(!sda_t, "slave drives 0");
    lat = 0;
    while (!sda_t && lat < 3 * TO) begin wait_cyc(1); lat++; end
    check(lat + 10 + QUART >= TO && lat + 10 + QUART <= TO + 10,
          $sformatf("released %0d cycles after the last SCL edge", lat + 10 + QUART));
    m_sda = 1'b1; wait_cyc(HALF); m_scl = 1'b1; wait_cyc(HALF); i2c_stop();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
