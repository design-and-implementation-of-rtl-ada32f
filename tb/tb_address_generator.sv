// Testbench of the address generator on a 16 x 16 image: the filter sequence
// must visit every inner pixel row by row (border skipped) and the zoom
// sequence every pixel of the 8 x 8 source image, with `last` high exactly
// on the final address; stepping past the end must hold the last address.
module tb_address_generator;
  import impro_pkg::*;

  localparam int N = 16;

  logic  clk = 1'b0, rst_n = 1'b0, init = 1'b0, step = 1'b0, zoom = 1'b0;
  addr_t aout;
  logic  last;
  int    checks = 0, failures = 0;

  address_generator #(.IMG_N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit z);
    int exp_list[$];
    if (z) for (int a = 0; a < N * N / 4; a++) exp_list.push_back(a);
    else
      for (int i = 1; i < N - 1; i++)
        for (int j = 1; j < N - 1; j++) exp_list.push_back(i * N + j);
    @(negedge clk); zoom = z; init = 1'b1;
    @(negedge clk); init = 1'b0; zoom = 1'b0;
    foreach (exp_list[k]) begin
      checks++;
      if (aout !== addr_t'(exp_list[k]) || last !== (k == exp_list.size() - 1)) begin
        failures++;
        $display("FAIL zoom=%0d item %0d: %0d expected %0d last=%0d", z, k, aout, exp_list[k], last);
      end
      // Idle cycles between steps must not move the address.
      step = 1'b0;
      if (k % 5 == 0) @(negedge clk);
      step = 1'b1;
      @(negedge clk);
      step = 1'b0;
    end
    checks++;
    if (aout !== addr_t'(exp_list[$]) || !last) begin failures++; $display("FAIL hold"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(1'b0);
    run(1'b1);
    run(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
