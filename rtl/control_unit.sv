// Control unit of the Im-Pro II processor.
//
// It steers the data flow for one operation on an image already loaded into
// bank 1. A `start` pulse latches the op-code and runs three phases:
//   CLEAR  bank 2 is written with zeros, one address per cycle (IMG_N^2
//          cycles), so the border pixels that no window reaches come out
//          black;
//   PROC   the reset generator pulses every window period (FILT_PERIOD for
//          the filters, ZOOM_PERIOD for zoom). Each pulse clears the
//          processing unit, hands the address generator's current centre to
//          the pixel reader (Read_3X3) and steps the address generator. The
//          pixel reader issues the window's reads; the memory interface
//          passes each pixel to the processing unit one cycle later and
//          writes every result the processing unit flags with d_rdy into
//          bank 2;
//   DRAIN  waits for the last window's write-back, then pulses `done`.
// While idle the memory port belongs to the external host (`busy` low).
//
// Window schedule, in cycles after a reset-generator pulse at cycle 0:
// filter reads at 1..9, pixels into the filter at 2..10, result written at
// 11 (period 12); zoom read at 1, pixel in at 2, four writes at 3..6
// (period 7).
//
// Follows the source description: the sub-blocks (reset generator, address
// generator, pixel reader, memory interface), the bank roles and the zero
// initialisation of the output image. Own choices: the phase FSM, the window
// periods and clearing bank 2 with the control unit itself.
module control_unit
  import impro_pkg::*;
#(
  parameter int unsigned IMG_N = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  op_e    opcode,
  output logic   busy,
  output logic   done,
  // external host port
  input  addr_t  ext_addr,
  input  logic   ext_bank,
  input  logic   ext_we,
  input  pixel_t ext_din,
  // memory unit
  output addr_t  mem_addr,
  output logic   mem_we,
  output logic   mem_sel,
  output pixel_t mem_din,
  input  pixel_t memin,
  // processing unit
  output op_e    p_op,
  output logic   prst,
  output logic   pen,
  output pixel_t prin,
  output addr_t  padin,
  input  pixel_t prout,
  input  addr_t  padout,
  input  logic   pd_rdy
);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_PROC, S_DRAIN} state_e;

  localparam int unsigned NPIX = IMG_N * IMG_N;
  localparam int unsigned CNTW = $clog2(NPIX + 1);

  state_e          state;
  op_e             op_q;
  logic [CNTW-1:0] cnt;
  logic            is_zoom;
  logic [3:0]      period;

  logic  ag_init, ag_last;
  addr_t ag_aout;
  addr_t r3_rd_addr, r3_center, r3_zoom_addr;
  logic  r3_rd_en, r3_busy;

  assign is_zoom = (op_q == OP_ZOOM);
  assign period  = is_zoom ? 4'(ZOOM_PERIOD) : 4'(FILT_PERIOD);
  assign busy    = (state != S_IDLE);
  assign ag_init = (state == S_CLEAR) && (cnt == CNTW'(NPIX - 1));
  assign done    = (state == S_DRAIN) && (cnt == CNTW'(period - 4'd2));
  assign p_op    = op_q;
  assign padin   = is_zoom ? r3_zoom_addr : r3_center;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      op_q  <= OP_LPF;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          op_q  <= opcode;
          cnt   <= '0;
          state <= S_CLEAR;
        end
        S_CLEAR: begin
          cnt <= cnt + CNTW'(1);
          if (cnt == CNTW'(NPIX - 1)) state <= S_PROC;
        end
        S_PROC: if (prst && ag_last) begin
          cnt   <= '0;
          state <= S_DRAIN;
        end
        S_DRAIN: begin
          cnt <= cnt + CNTW'(1);
          if (done) state <= S_IDLE;
        end
      endcase
    end
  end

  reset_generator u_rstgen (
    .clk, .rst_n, .sel(state == S_PROC), .period, .prst
  );

  address_generator #(.IMG_N(IMG_N)) u_addrgen (
    .clk, .rst_n, .init(ag_init), .step(prst), .zoom(op_q == OP_ZOOM),
    .aout(ag_aout), .last(ag_last)
  );

  read_3x3 #(.IMG_N(IMG_N)) u_read3x3 (
    .clk, .rst_n, .sel(prst), .zoom(is_zoom), .adin(ag_aout),
    .rd_addr(r3_rd_addr), .rd_en(r3_rd_en), .center_addr(r3_center),
    .zoom_address(r3_zoom_addr), .busy(r3_busy)
  );

  memory_read_write u_mrw (
    .clk, .rst_n,
    .ext_en(state == S_IDLE), .ext_addr, .ext_bank, .ext_we, .ext_din,
    .clr_en(state == S_CLEAR), .clr_addr(addr_t'(cnt)),
    .rd_en(r3_rd_en), .rd_addr(r3_rd_addr),
    .d_rdy(pd_rdy), .prout, .wr_addr(padout),
    .memin, .mem_addr, .mem_we, .mem_sel, .mem_din,
    .prin, .pen
  );

  a_reader_idle_at_window_start: assert property (@(posedge clk) disable iff (!rst_n)
    prst |-> !r3_busy)
    else $error("control_unit: window started while the pixel reader was busy");

endmodule
