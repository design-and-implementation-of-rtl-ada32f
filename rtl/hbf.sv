// High-boost filter for one 3x3 window, fed one pixel per clock.
//
// Mask: all-pass plus C times the high-pass mask, i.e. -C around a centre of
// 8C+1, so the coefficients sum to one and part of the background is kept.
// The nine pixels arrive serially in row-major order while `en` is high;
// `rst` clears the window first. The neighbours are summed and the centre
// (fifth pixel) captured; after the ninth pixel the result
// (8C+1)*centre - C*neighbour_sum is formed in two's complement, a negative
// result is clipped to zero and one above 255 saturated to 255. It appears on
// `dout` with a one-cycle `d_rdy` pulse in the cycle after the ninth pixel.
//
// Follows the source description: the high-boost mask, the neighbour-sum-
// then-subtract datapath and negative clipping. Own choices: the boost
// constant C is a parameter with default 1 (the description only bounds it
// to a natural number up to about 5) and the upper saturation.
module hbf
  import impro_pkg::*;
#(
  parameter int unsigned C = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   rst,
  input  logic   en,
  input  pixel_t pixin,
  output pixel_t dout,
  output logic   d_rdy
);

  localparam int unsigned RW = 20;  // room for (8C+1)*255 with C up to 100

  logic [10:0]         nsum;
  pixel_t              center;
  logic [3:0]          cnt;
  logic [10:0]         nsum_f;
  pixel_t              center_f;
  logic signed [RW-1:0] pos, neg, diff;

  always_comb begin
    nsum_f   = nsum;
    center_f = center;
    if (cnt == 4'(CENTER_IDX)) center_f = pixin;
    else                       nsum_f   = nsum + 11'(pixin);
    pos  = $signed(RW'(center_f) * RW'(8 * C + 1));
    neg  = $signed(RW'(nsum_f) * RW'(C));
    diff = pos - neg;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nsum   <= '0;
      center <= '0;
      cnt    <= '0;
      dout   <= '0;
      d_rdy  <= 1'b0;
    end else if (rst) begin
      nsum   <= '0;
      center <= '0;
      cnt    <= '0;
      d_rdy  <= 1'b0;
    end else begin
      d_rdy <= 1'b0;
      if (en && cnt < 4'd9) begin
        nsum   <= nsum_f;
        center <= center_f;
        cnt    <= cnt + 4'd1;
        if (cnt == 4'd8) begin
          if (diff < 0)              dout <= '0;
          else if (diff > RW'(255))  dout <= 8'hFF;
          else                       dout <= diff[7:0];
          d_rdy <= 1'b1;
        end
      end
    end
  end

  initial assert (C >= 1 && C <= 100) else $error("hbf: C must be in 1..100");

endmodule
