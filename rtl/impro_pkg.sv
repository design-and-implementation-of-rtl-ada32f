// Shared types and constants of the Im-Pro II neighbourhood image processor.
//
// The op-code selects one of the four neighbourhood operations. The window
// periods are the number of clock cycles the control unit spends on one
// output window: a filter window reads nine pixels serially (one per cycle),
// a zoom window reads one pixel and writes it to four locations. The periods
// include the one-cycle memory read latency and the registered filter output;
// they are this design's own choice, derived from the schedule in
// control_unit.sv. The op-code encoding is also this design's own choice.
package impro_pkg;

  localparam int unsigned PIX_W  = 8;   // grayscale pixel width
  localparam int unsigned ADDR_W = 16;  // address of one 64 KB bank

  typedef logic [PIX_W-1:0]  pixel_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef enum logic [1:0] {
    OP_LPF  = 2'd0,  // low-pass filtering (smoothing)
    OP_HPF  = 2'd1,  // high-pass filtering (sharpening)
    OP_HBF  = 2'd2,  // high-boost filtering
    OP_ZOOM = 2'd3   // zoom by replication (200 %)
  } op_e;

  // Cycles between two window starts (reset-generator period).
  localparam int unsigned FILT_PERIOD = 12;
  localparam int unsigned ZOOM_PERIOD = 7;

  // Position of the centre pixel in the serial 3x3 stream (M5, counting from 0).
  localparam int unsigned CENTER_IDX = 4;

endpackage
