// Zoom by replication (200 %) for one source pixel.
//
// Replication is equivalent to interlacing the image with zeros and
// convolving it with the 2x2 all-ones mask: every source pixel ends up in a
// 2x2 block of the enlarged image. This unit does it directly. When `en` is
// high it captures the pixel `din` and the destination address `adin` of the
// block's top-left corner; during the next four cycles it raises `d_rdy` and
// presents the same pixel on `dout` with the addresses adin, adin+1,
// adin+IMG_N and adin+IMG_N+1 on `adout` (the block's four positions in an
// IMG_N-wide frame), so the control unit writes it once per cycle.
// `rst` (reset-generator pulse) abandons any block in progress.
//
// Follows the source description: the pixel is copied into its three
// neighbours by generating their addresses, taking four clock cycles.
// Own choice: the order of the four writes.
module zoom_filter
  import impro_pkg::*;
#(
  parameter int unsigned IMG_N = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   rst,
  input  logic   en,
  input  pixel_t din,
  input  addr_t  adin,
  output addr_t  adout,
  output pixel_t dout,
  output logic   d_rdy
);

  pixel_t     pix_q;
  addr_t      base_q;
  logic [1:0] k;
  logic       active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_q  <= '0;
      base_q <= '0;
      k      <= '0;
      active <= 1'b0;
    end else if (rst) begin
      k      <= '0;
      active <= 1'b0;
    end else if (en) begin
      pix_q  <= din;
      base_q <= adin;
      k      <= '0;
      active <= 1'b1;
    end else if (active) begin
      k <= k + 2'd1;
      if (k == 2'd3) active <= 1'b0;
    end
  end

  always_comb begin
    unique case (k)
      2'd0: adout = base_q;
      2'd1: adout = base_q + addr_t'(1);
      2'd2: adout = base_q + addr_t'(IMG_N);
      2'd3: adout = base_q + addr_t'(IMG_N + 1);
    endcase
  end

  assign dout  = pix_q;
  assign d_rdy = active;

endmodule
