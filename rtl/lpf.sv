// Low-pass (smoothing) filter for one 3x3 window, fed one pixel per clock.
//
// The nine window pixels arrive serially in row-major order (M1..M9), one per
// cycle while `en` is high; `rst` (the reset generator's pulse) clears the
// window before it starts. The mask is the alternative averaging mask
//     1 1 1 / 1 2 1 / 1 1 1
// so the centre pixel (fifth in the stream) is weighted by a left shift of
// one and the others are added as they are. The running sum is held in a
// 12-bit accumulator. After the ninth pixel the sum is divided by 8 with a
// right shift (truncation toward zero) and presented on `dout` with a
// one-cycle `d_rdy` pulse, in the cycle after the ninth pixel.
//
// Follows the source description: the serial one-pixel-per-cycle datapath,
// the shift-based weights, the 12-bit sum, the divide by 8 and d_rdy.
// Own choices: with mask weights summing to 10 and a divide by 8 the result
// can exceed 255, so it is saturated at 255; reset is synchronous through
// `rst`, with an asynchronous `rst_n` for power-on.
module lpf
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

  logic [11:0] acc;
  logic [3:0]  cnt;
  logic [11:0] weighted;
  logic [11:0] total;
  logic [8:0]  quot;

  // Centre pixel weighted by 2 (shift), others by 1.
  assign weighted = (cnt == 4'(CENTER_IDX)) ? {3'b0, pixin, 1'b0} : {4'b0, pixin};
  assign total    = acc + weighted;
  assign quot     = total[11:3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      cnt   <= '0;
      dout  <= '0;
      d_rdy <= 1'b0;
    end else if (rst) begin
      acc   <= '0;
      cnt   <= '0;
      d_rdy <= 1'b0;
    end else begin
      d_rdy <= 1'b0;
      if (en && cnt < 4'd9) begin
        acc <= total;
        cnt <= cnt + 4'd1;
        if (cnt == 4'd8) begin
          dout  <= (quot > 9'd255) ? 8'hFF : quot[7:0];
          d_rdy <= 1'b1;
        end
      end
    end
  end

endmodule
