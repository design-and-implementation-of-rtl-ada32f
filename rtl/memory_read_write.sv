// Memory interface (Memory_Read_Write) between the control unit, the memory
// unit and the processing unit.
//
// It owns the single memory port and grants it, per cycle, in this order:
//   1. a result from the processing unit (`d_rdy`): write `prout` to bank 2
//      at `wr_addr`;
//   2. a neighbourhood read from the pixel reader (`rd_en`): read bank 1 at
//      `rd_addr`;
//   3. a clearing write (`clr_en`): write zero to bank 2 at `clr_addr`;
//   4. the external port (`ext_en`): the host's address, bank, rd/wr and data.
// The control unit schedules windows so that 1 and 2 never coincide; an
// assertion checks it. The memory returns read data one cycle later on
// `memin`; it is passed to the processing unit on `prin` with `pen` high in
// that cycle (the read request delayed by one clock).
//
// Follows the block diagram (address out, rd/wr, bank select, write data,
// pixel to and from the processor, d_rdy). Own choices: the priority order
// and the clearing write.
module memory_read_write
  import impro_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // external host port
  input  logic   ext_en,
  input  addr_t  ext_addr,
  input  logic   ext_bank,
  input  logic   ext_we,
  input  pixel_t ext_din,
  // clearing of the output bank
  input  logic   clr_en,
  input  addr_t  clr_addr,
  // reads from the pixel reader
  input  logic   rd_en,
  input  addr_t  rd_addr,
  // results from the processing unit
  input  logic   d_rdy,
  input  pixel_t prout,
  input  addr_t  wr_addr,
  // memory side
  input  pixel_t memin,
  output addr_t  mem_addr,
  output logic   mem_we,
  output logic   mem_sel,
  output pixel_t mem_din,
  // processing-unit side
  output pixel_t prin,
  output logic   pen
);

  always_comb begin
    mem_addr = '0;
    mem_we   = 1'b0;
    mem_sel  = 1'b0;
    mem_din  = '0;
    if (d_rdy) begin
      mem_addr = wr_addr;
      mem_we   = 1'b1;
      mem_sel  = 1'b1;
      mem_din  = prout;
    end else if (rd_en) begin
      mem_addr = rd_addr;
    end else if (clr_en) begin
      mem_addr = clr_addr;
      mem_we   = 1'b1;
      mem_sel  = 1'b1;
    end else if (ext_en) begin
      mem_addr = ext_addr;
      mem_we   = ext_we;
      mem_sel  = ext_bank;
      mem_din  = ext_din;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pen <= 1'b0;
    else        pen <= rd_en && !d_rdy;
  end

  assign prin = memin;

  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n) !(d_rdy && rd_en))
    else $error("memory_read_write: result write and pixel read in the same cycle");

endmodule
