// i2c_data_regs: the controller's output and input registers.
//
// Output registers (data_out) hold the bytes a master writes: the first data
// byte after the address lands in register 0, the next in register 1, and so
// on. Each is written in the cycle rx_we is high, at index idx, and keeps its
// value until overwritten, so the surrounding logic (image filter
// parameters, or a processor) reads them as plain configuration registers.
//
// Input registers hold the bytes returned on a master read. They take a copy
// of the whole data_in bus in the cycle snapshot is high, which the state
// machine raises once per read transfer, right after it acknowledged the
// address; a multi-byte read therefore returns one consistent set of values
// even if data_in changes during it. tx_byte is the input register at idx,
// combinationally; an index past the last register returns 8'hFF, which on
// the bus is the same as a released SDA line.
//
// That the controller stores data in input and output registers, and the
// 16-byte default size, follow the controller description. The snapshot
// point, the byte order and the reset value 0 are this design's choices.
// Reset is synchronous and active high.
module i2c_data_regs
  import i2c_slave_pkg::*;
#(
  parameter int unsigned NUM_RX_BYTES = 16,
  parameter int unsigned NUM_TX_BYTES = 16
) (
  input  logic                         clk,
  input  logic                         reset,
  input  logic                         rx_we,
  input  logic [IDX_W-1:0]             idx,
  input  logic [7:0]                   rx_byte,
  input  logic                         snapshot,
  input  logic [NUM_TX_BYTES-1:0][7:0] data_in,
  output logic [7:0]                   tx_byte,
  output logic [NUM_RX_BYTES-1:0][7:0] data_out
);

  logic [NUM_TX_BYTES-1:0][7:0] in_regs;

  always_ff @(posedge clk) begin
    if (reset) begin
      data_out <= '0;
    end else if (rx_we && (32'(idx) < NUM_RX_BYTES)) begin
      data_out[idx] <= rx_byte;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      in_regs <= '0;
    end else if (snapshot) begin
      in_regs <= data_in;
    end
  end

  always_comb begin
    tx_byte = 8'hFF;
    for (int unsigned i = 0; i < NUM_TX_BYTES; i++) begin
      if (32'(idx) == i) tx_byte = in_regs[i];
    end
  end

endmodule
