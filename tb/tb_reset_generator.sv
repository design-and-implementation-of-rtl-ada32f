// Testbench of the reset generator: with sel high the pulse must come in the
// first cycle and then exactly every `period` cycles, for several periods;
// with sel low there must be no pulse, and a new run starts with a pulse.
module tb_reset_generator;

  logic       clk = 1'b0, rst_n = 1'b0, sel = 1'b0;
  logic [3:0] period = 4'd12;
  logic       prst;
  int         checks = 0, failures = 0;

  reset_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int per[5];
    per = '{12, 7, 1, 3, 15};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (per[i]) begin
      @(negedge clk);
      period = 4'(per[i]);
      sel = 1'b1;
      for (int c = 0; c < 5 * per[i]; c++) begin
        #1;
        checks++;
        if (prst !== (c % per[i] == 0)) begin
          failures++;
          $display("FAIL period %0d cycle %0d prst=%0d", per[i], c, prst);
        end
        @(negedge clk);
      end
      sel = 1'b0;
      repeat (3) begin
        #1;
        checks++;
        if (prst) failures++;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
