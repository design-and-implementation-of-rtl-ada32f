// Reset generator: periodic clear pulse for the processing unit.
//
// While `sel` is high it issues a one-cycle pulse on `prst` in its first
// cycle and then every `period` cycles. The pulse clears the result of the
// previous window in the processing unit and, in the control unit, starts
// the next window (the centre address is handed to the pixel reader and the
// address generator steps). When `sel` is low the phase counter rests at 0,
// so the next run starts with a pulse at once. `period` must be at least 1.
//
// Follows the source description (a pulse generator issued periodically to
// clear the previous unit operation). Own choice: the programmable period and
// the use of the pulse as the window start.
module reset_generator (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sel,
  input  logic [3:0] period,
  output logic       prst
);

  logic [3:0] cnt;

  assign prst = sel && (cnt == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   cnt <= '0;
    else if (!sel)                cnt <= '0;
    else if (cnt >= period - 4'd1) cnt <= '0;
    else                          cnt <= cnt + 4'd1;
  end

endmodule
