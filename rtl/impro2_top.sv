// Im-Pro II: a neighbourhood image processor for 8-bit grayscale images.
//
// A 3x3 mask slides over the image; each output pixel is a weighted sum of
// the input pixel and its eight neighbours. Four operations are built in,
// chosen by `opcode`: low-pass (smoothing), high-pass (sharpening),
// high-boost filtering and 200 % zoom by pixel replication.
//
// The processor is three units on one clock: a 128 KB memory unit of two
// 64 KB banks (input image in bank 1, result in bank 2), a control unit that
// generates the window addresses and moves pixels, and a processing unit
// that works on one pixel per cycle.
//
// Use: with `busy` low, write the IMG_N x IMG_N input image (for zoom the
// (IMG_N/2) x (IMG_N/2) source image, stored row by row from address 0) into
// bank 1 through the external port (`ext_bank` = 0, `ext_we` = 1), one pixel
// per cycle. Pulse `start` with the op-code. When `done` pulses, read the
// IMG_N x IMG_N result from bank 2 (`ext_bank` = 1, `ext_we` = 0); `ext_dout`
// follows the address by one cycle. A filter takes IMG_N^2 cycles to clear
// bank 2 plus 12 cycles per inner pixel; zoom takes IMG_N^2 + 7*(IMG_N/2)^2.
// Border pixels of a filtered image are 0.
//
// The structure and the arithmetic follow the source description; the
// op-code encoding, the window schedule and the external port protocol are
// this design's own.
module impro2_top
  import impro_pkg::*;
#(
  parameter int unsigned IMG_N = 256,
  parameter int unsigned HBF_C = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [1:0] opcode,
  input  addr_t      ext_addr,
  input  logic       ext_bank,
  input  logic       ext_we,
  input  pixel_t     ext_din,
  output pixel_t     ext_dout,
  output logic       busy,
  output logic       done
);

  addr_t  mem_addr;
  logic   mem_we, mem_sel;
  pixel_t mem_din, mem_dout;

  op_e    p_op;
  logic   prst, pen, pd_rdy;
  pixel_t prin, prout;
  addr_t  padin, padout;

  memory_bank #(.ADDR_W(ADDR_W), .DATA_W(PIX_W)) u_mem (
    .clk, .mb_sel(mem_sel), .we(mem_we), .address(mem_addr),
    .data_in(mem_din), .dataout(mem_dout)
  );

  control_unit #(.IMG_N(IMG_N)) u_ctrl (
    .clk, .rst_n, .start, .opcode(op_e'(opcode)), .busy, .done,
    .ext_addr, .ext_bank, .ext_we, .ext_din,
    .mem_addr, .mem_we, .mem_sel, .mem_din, .memin(mem_dout),
    .p_op, .prst, .pen, .prin, .padin,
    .prout, .padout, .pd_rdy
  );

  nh_processor #(.IMG_N(IMG_N), .HBF_C(HBF_C)) u_nh (
    .clk, .rst_n, .rst(prst), .opcode(p_op), .pen, .pixin(prin), .adin(padin),
    .dout(prout), .adout(padout), .d_rdy(pd_rdy)
  );

  assign ext_dout = mem_dout;

endmodule
