// Pixel reader (Read_3X3): turns a window centre into nine serial reads.
//
// On `sel` (the reset-generator pulse) it captures the address `adin` from
// the address generator. In filter mode it then issues, one per cycle for
// the next nine cycles, the addresses of the 3x3 neighbourhood in increasing
// order (row-major, M1 to M9):
//   c-N-1, c-N, c-N+1, c-1, c, c+1, c+N-1, c+N, c+N+1   (N = IMG_N)
// with `rd_en` high, so the centre pixel is the fifth one read. In zoom mode
// `adin` is a source pixel address; it issues that single read and computes
// `zoom_address`, the top-left corner of the pixel's 2x2 block in the
// IMG_N x IMG_N output frame: source (i, j) -> output (2i, 2j).
// `center_addr` holds the captured address until the next `sel`; it is where
// a filter result is written back.
//
// Follows the source description (the pixel reader generates the
// neighbourhood addresses and issues them serially in increasing order).
// Own choice: the mapping of the linear zoom source address to the output
// frame.
module read_3x3
  import impro_pkg::*;
#(
  parameter int unsigned IMG_N = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  sel,
  input  logic  zoom,
  input  addr_t adin,
  output addr_t rd_addr,
  output logic  rd_en,
  output addr_t center_addr,
  output addr_t zoom_address,
  output logic  busy
);

  localparam int unsigned HALF = IMG_N / 2;
  localparam int unsigned HB   = $clog2(HALF);  // bits of a half-size coordinate

  addr_t      center;
  logic [3:0] k;
  logic       active;
  addr_t      offset;
  addr_t      src_row, src_col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      center <= '0;
      k      <= '0;
      active <= 1'b0;
    end else if (sel) begin
      center <= adin;
      k      <= '0;
      active <= 1'b1;
    end else if (active) begin
      k <= k + 4'd1;
      if (zoom || k == 4'd8) active <= 1'b0;
    end
  end

  // Offset of the k-th neighbour from the centre (two's complement).
  always_comb begin
    unique case (k)
      4'd0:    offset = addr_t'(-IMG_N - 1);
      4'd1:    offset = addr_t'(-IMG_N);
      4'd2:    offset = addr_t'(-IMG_N + 1);
      4'd3:    offset = addr_t'(-1);
      4'd5:    offset = addr_t'(1);
      4'd6:    offset = addr_t'(IMG_N - 1);
      4'd7:    offset = addr_t'(IMG_N);
      4'd8:    offset = addr_t'(IMG_N + 1);
      default: offset = '0;
    endcase
  end

  assign rd_addr      = zoom ? center : center + offset;
  assign rd_en        = active;
  assign busy         = active;
  assign center_addr  = center;
  assign src_row      = center >> HB;
  assign src_col      = center & addr_t'(HALF - 1);
  assign zoom_address = addr_t'((src_row * 2) * IMG_N + src_col * 2);

endmodule
