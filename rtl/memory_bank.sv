// Memory unit of the Im-Pro II processor: 128 KB in two 64 KB banks.
//
// RAM 1 (bank 1, `mb_sel` = 0) holds the input image and RAM 2 (bank 2,
// `mb_sel` = 1) the processed image. There is a single access port: a 16-bit
// address, an 8-bit write data input, a read/write line (`we` = 1 writes)
// and an 8-bit data output. Every pixel is individually addressable. Reads
// are synchronous: `dataout` shows the addressed word of the selected bank
// one clock after the address. Loading or reading back an N x N image thus
// takes N*N cycles through this port.
//
// Follows the source description: capacity, two equal halves, bank roles,
// 16-bit address and 8-bit data. Own choice: synchronous read with one cycle
// of latency.
module memory_bank
#(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              mb_sel,
  input  logic              we,
  input  logic [ADDR_W-1:0] address,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] dataout
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [DATA_W-1:0] dout1, dout2;
  logic              sel_q;

  spram #(.WIDTH(DATA_W), .DEPTH(DEPTH), .AW(ADDR_W)) u_ram1 (
    .clk, .we(we && !mb_sel), .addr(address), .din(data_in), .dout(dout1)
  );

  spram #(.WIDTH(DATA_W), .DEPTH(DEPTH), .AW(ADDR_W)) u_ram2 (
    .clk, .we(we && mb_sel), .addr(address), .din(data_in), .dout(dout2)
  );

  always_ff @(posedge clk) sel_q <= mb_sel;

  assign dataout = sel_q ? dout2 : dout1;

endmodule
