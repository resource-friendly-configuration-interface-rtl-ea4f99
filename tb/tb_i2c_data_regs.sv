// tb_i2c_data_regs: checks the output and input registers.
//
// Random writes at random indices (including indices past the end, which
// must be ignored) against a shadow copy kept by the testbench; snapshots of
// data_in that must hold while data_in keeps changing; tx_byte at every
// index, 8'hFF past the end; and reset clearing both register sets.
module tb_i2c_data_regs;
  import i2c_slave_pkg::*;

  localparam int NRX = 16;
  localparam int NTX = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 reset, rx_we, snapshot;
  logic [IDX_W-1:0]     idx;
  logic [7:0]           rx_byte, tx_byte;
  logic [NTX-1:0][7:0]  data_in;
  logic [NRX-1:0][7:0]  data_out;

  i2c_data_regs #(.NUM_RX_BYTES(NRX), .NUM_TX_BYTES(NTX)) dut (
    .clk(clk), .reset(reset), .rx_we(rx_we), .idx(idx), .rx_byte(rx_byte),
    .snapshot(snapshot), .data_in(data_in), .tx_byte(tx_byte), .data_out(data_out)
  );

  int checks = 0, failures = 0;
  logic [7:0] shadow[NRX];
  logic [7:0] snap[NTX];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; rx_we = 1'b0; snapshot = 1'b0; idx = '0; rx_byte = '0;
    for (int i = 0; i < NTX; i++) data_in[i] = 8'($urandom);
    repeat (3) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    check(data_out == '0, "output registers cleared by reset");
    for (int i = 0; i < NTX; i++) begin
      idx = IDX_W'(i); #1;
      check(tx_byte == 8'h00, "input registers cleared by reset");
    end
    foreach (shadow[i]) shadow[i] = 8'h00;

    // random writes, some past the end
    for (int n = 0; n < 500; n++) begin
      idx     = IDX_W'($urandom_range(NRX + 4, 0));
      rx_byte = 8'($urandom);
      rx_we   = ($urandom_range(3, 0) != 0);
      @(negedge clk);
      if (rx_we && idx < NRX) shadow[idx] = rx_byte;
      rx_we = 1'b0;
      for (int i = 0; i < NRX; i++)
        check(data_out[i] == shadow[i], $sformatf("data_out[%0d] after write %0d", i, n));
    end

    // snapshots
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < NTX; i++) data_in[i] = 8'($urandom);
      snapshot = 1'b1;
      @(negedge clk);
      snapshot = 1'b0;
      for (int i = 0; i < NTX; i++) snap[i] = data_in[i];
      for (int i = 0; i < NTX; i++) data_in[i] = 8'($urandom);   // must not show
      for (int i = 0; i < NTX + 8; i++) begin
        idx = IDX_W'(i); #1;
        check(tx_byte == (i < NTX ? snap[i] : 8'hFF), $sformatf("tx_byte idx %0d", i));
      end
      @(negedge clk);
    end

    reset = 1'b1; @(negedge clk); reset = 1'b0;
    check(data_out == '0, "reset clears again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
