// Address generator: the sequence of window centres (or zoom source pixels).
//
// Filter mode (`zoom` = 0): it walks the centre (i, j) of the 3x3 window over
// every pixel that the mask can cover completely, rows i = 1..IMG_N-2 and,
// within a row, columns j = 1..IMG_N-2, and outputs aout = i*IMG_N + j, the
// pixel's address in a row-major IMG_N x IMG_N image. Border pixels are
// skipped. Zoom mode (`zoom` = 1): it walks every pixel of the
// (IMG_N/2) x (IMG_N/2) source image, aout = i*(IMG_N/2) + j, from 0 upward.
//
// `init` loads the first address of the mode, `step` advances to the next;
// `last` is high while `aout` is the final address of the sequence. `aout`
// is registered and valid from the cycle after `init`.
//
// Follows the source description (the address generator seeds the centre
// address to the pixel reader; edge pixels are not processed; the zoom input
// is half the size). Own choice: the row-major scan order and the linear
// storage of the zoom source image.
module address_generator
  import impro_pkg::*;
#(
  parameter int unsigned IMG_N = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init,
  input  logic  step,
  input  logic  zoom,
  output addr_t aout,
  output logic  last
);

  localparam int unsigned HALF = IMG_N / 2;
  localparam int unsigned CW   = $clog2(IMG_N + 1);

  logic [CW-1:0] row, col;
  logic          zoom_q;
  logic [CW-1:0] first, lastpos;

  assign first   = zoom_q ? '0 : CW'(1);
  assign lastpos = zoom_q ? CW'(HALF - 1) : CW'(IMG_N - 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row    <= '0;
      col    <= '0;
      zoom_q <= 1'b0;
    end else if (init) begin
      zoom_q <= zoom;
      row    <= zoom ? '0 : CW'(1);
      col    <= zoom ? '0 : CW'(1);
    end else if (step && !last) begin
      if (col == lastpos) begin
        col <= first;
        row <= row + CW'(1);
      end else begin
        col <= col + CW'(1);
      end
    end
  end

  assign aout = zoom_q ? addr_t'(row * HALF + 32'(col)) : addr_t'(row * IMG_N + 32'(col));
  assign last = (row == lastpos) && (col == lastpos);

  initial assert (IMG_N >= 4 && IMG_N * IMG_N <= 2 ** ADDR_W && (IMG_N & (IMG_N - 1)) == 0)
    else $error("address_generator: IMG_N must be a power of two, 4..256");

endmodule
