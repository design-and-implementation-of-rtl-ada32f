// Neighbourhood (NH) processing unit of the Im-Pro II processor.
//
// A 1:4 demultiplexer steers the serial pixel stream from the control unit to
// one of four units selected by the op-code: low-pass filter, high-pass
// filter, high-boost filter and zoom-by-replication unit. A 4:1 multiplexer
// returns that unit's result pixel, data-ready flag and write address. All
// four units share the reset-generator pulse `rst`, which clears them before
// each window.
//
// Interface: one pixel per cycle on `pixin` qualified by `pen`; `adin` is the
// address the result belongs to (window centre for the filters, top-left of
// the 2x2 destination block for zoom). A filter result appears with `d_rdy`
// the cycle after the ninth pixel; a zoom pixel appears with `d_rdy` on four
// consecutive cycles after its one input pixel, each with its own `adout`.
//
// Follows the block diagram of the processing unit. Own choices: the op-code
// encoding and the address path through the output multiplexer.
module nh_processor
  import impro_pkg::*;
#(
  parameter int unsigned IMG_N = 256,
  parameter int unsigned HBF_C = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   rst,
  input  op_e    opcode,
  input  logic   pen,
  input  pixel_t pixin,
  input  addr_t  adin,
  output pixel_t dout,
  output addr_t  adout,
  output logic   d_rdy
);

  logic   [3:0] en_l;
  pixel_t [3:0] pix_l;
  pixel_t [3:0] dout_l;
  logic   [3:0] rdy_l;
  addr_t        zoom_adout;

  demux_1to4 u_demux (
    .sel(opcode), .en(pen), .pixin(pixin), .en_out(en_l), .pix_out(pix_l)
  );

  lpf u_lpf (
    .clk, .rst_n, .rst, .en(en_l[OP_LPF]), .pixin(pix_l[OP_LPF]),
    .dout(dout_l[OP_LPF]), .d_rdy(rdy_l[OP_LPF])
  );

  hpf u_hpf (
    .clk, .rst_n, .rst, .en(en_l[OP_HPF]), .pixin(pix_l[OP_HPF]),
    .dout(dout_l[OP_HPF]), .d_rdy(rdy_l[OP_HPF])
  );

  hbf #(.C(HBF_C)) u_hbf (
    .clk, .rst_n, .rst, .en(en_l[OP_HBF]), .pixin(pix_l[OP_HBF]),
    .dout(dout_l[OP_HBF]), .d_rdy(rdy_l[OP_HBF])
  );

  zoom_filter #(.IMG_N(IMG_N)) u_zoom (
    .clk, .rst_n, .rst, .en(en_l[OP_ZOOM]), .din(pix_l[OP_ZOOM]), .adin(adin),
    .adout(zoom_adout), .dout(dout_l[OP_ZOOM]), .d_rdy(rdy_l[OP_ZOOM])
  );

  mux_4to1 u_mux (
    .sel(opcode), .din(dout_l), .rdy_in(rdy_l), .adin(adin),
    .zoom_adout(zoom_adout), .dout(dout), .d_rdy(d_rdy), .adout(adout)
  );

endmodule
