// 1:4 demultiplexer at the input of the neighbourhood processing unit.
//
// Routes the serial pixel stream and its enable to the unit selected by the
// op-code (Enable[1:0]): output 0 feeds the low-pass filter, 1 the high-pass
// filter, 2 the high-boost filter, 3 the zoom unit. Unselected outputs carry
// zero with their enable low. The pixel is registered into the selected
// output lane only by the filter itself, so the demultiplexer is purely
// combinational and adds no latency.
//
// Follows the block diagram (one 8-bit pixel input, four pixel outputs,
// 2-bit select). Own choice: the op-code encoding and combinational routing.
module demux_1to4
  import impro_pkg::*;
(
  input  op_e          sel,
  input  logic         en,
  input  pixel_t       pixin,
  output logic [3:0]   en_out,
  output pixel_t [3:0] pix_out
);

  always_comb begin
    en_out  = '0;
    pix_out = '0;
    en_out[sel]  = en;
    pix_out[sel] = pixin;
  end

endmodule
