// 4:1 multiplexer at the output of the neighbourhood processing unit.
//
// Selects, by op-code, the result pixel, its data-ready flag and its write
// address from one of the four units: 0 low-pass, 1 high-pass, 2 high-boost,
// 3 zoom. The filters write their result back at the window's centre
// address, which the control unit supplies on `adin`; the zoom unit produces
// its own addresses. Purely combinational.
//
// Follows the block diagram (4:1 multiplexer driving dout and d_rdy). Own
// choice: the write address travels through the same multiplexer.
module mux_4to1
  import impro_pkg::*;
(
  input  op_e          sel,
  input  pixel_t [3:0] din,
  input  logic   [3:0] rdy_in,
  input  addr_t        adin,
  input  addr_t        zoom_adout,
  output pixel_t       dout,
  output logic         d_rdy,
  output addr_t        adout
);

  always_comb begin
    dout  = din[sel];
    d_rdy = rdy_in[sel];
    adout = (sel == OP_ZOOM) ? zoom_adout : adin;
  end

endmodule
