// Single-port synchronous RAM, one of the two banks of the memory unit.
//
// DEPTH words of WIDTH bits. A write happens at the clock edge when `we` is
// high; a read returns mem[addr] on `dout` one cycle after the address
// (registered read, as in an FPGA block RAM). Contents are not reset; the
// control unit clears the output bank itself before processing.
module spram #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    dout <= mem[addr];
  end

endmodule
