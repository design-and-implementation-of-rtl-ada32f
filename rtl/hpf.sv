// High-pass (sharpening) filter for one 3x3 window, fed one pixel per clock.
//
// Mask: -1 -1 -1 / -1 8 -1 / -1 -1 -1. The nine pixels arrive serially in
// row-major order while `en` is high; `rst` clears the window first. The
// eight neighbours are summed into an 11-bit accumulator and the centre
// pixel (fifth in the stream) is captured. After the ninth pixel the
// neighbour sum is subtracted from the centre shifted left by three, in
// 12-bit two's complement; the sign of the difference flags a negative
// result, which is clipped to zero. The result appears on `dout` with a
// one-cycle `d_rdy` pulse in the cycle after the ninth pixel.
//
// Follows the source description: neighbours summed first, subtraction from
// the weighted centre in two's complement, negative results set to zero,
// nine cycles per window. Own choice: results above 255 are saturated to 255
// (the description only states the handling of negative results).
module hpf
  import impro_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   rst,
  input  logic   en,
  input  pixel_t pixin,
  output pixel_t dout,
  output logic   d_rdy
);

  logic [10:0]       nsum;    // sum of the eight neighbours
  pixel_t            center;
  logic [3:0]        cnt;
  logic [10:0]       nsum_f;  // neighbour sum including the current pixel
  pixel_t            center_f;
  logic signed [11:0] diff;

  always_comb begin
    nsum_f   = nsum;
    center_f = center;
    if (cnt == 4'(CENTER_IDX)) center_f = pixin;
    else                       nsum_f   = nsum + 11'(pixin);
    diff = $signed({1'b0, center_f, 3'b000}) - $signed({1'b0, nsum_f});
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
          if (diff[11])             dout <= '0;     // negative: clip to zero
          else if (diff > 12'sd255) dout <= 8'hFF;
          else                      dout <= diff[7:0];
          d_rdy <= 1'b1;
        end
      end
    end
  end

endmodule
