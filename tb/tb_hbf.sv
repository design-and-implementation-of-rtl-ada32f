// Testbench of the high-boost filter (boost constant C = 3): random and extreme 3x3 windows fed one
// pixel per cycle (with idle gaps in between), results compared with the
// reference model; d_rdy must pulse exactly once, in the cycle after the
// ninth pixel.
module tb_hbf;
  import impro_pkg::*;
  import tb_ref_pkg::*;

  localparam int OP = 2;
  localparam int C  = 3;

  logic   clk = 1'b0, rst_n = 1'b0, rst = 1'b0, en = 1'b0;
  pixel_t pixin = '0, dout;
  logic   d_rdy;
  int     checks = 0, failures = 0;

  hbf #(.C(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic window(int p[9], bit gaps);
    int exp_v, rdy_seen;
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    for (int k = 0; k < 9; k++) begin
      en = 1'b1; pixin = pixel_t'(p[k]);
      @(negedge clk);
      checks++;
      if (d_rdy !== (k == 8)) begin failures++; $display("FAIL d_rdy at pixel %0d", k); end
      en = 1'b0;
      if (gaps && $urandom_range(0, 1)) begin
        @(negedge clk);
        if (d_rdy && k != 8) failures++;
      end
    end
    exp_v = clip8(raw_value(OP, C, p));
    checks++;
    if (dout !== pixel_t'(exp_v)) begin
      failures++;
      $display("FAIL result %0d expected %0d", dout, exp_v);
    end
    // No second pulse, and a tenth pixel does not change the result.
    en = 1'b1; pixin = 8'd77;
    @(negedge clk); en = 1'b0;
    checks++;
    if (d_rdy || dout !== pixel_t'(exp_v)) begin failures++; $display("FAIL extra pixel"); end
  endtask

  initial begin
    int p[9];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 9; k++) p[k] = 255;
    window(p, 1'b0);
    for (int k = 0; k < 9; k++) p[k] = 0;
    window(p, 1'b0);
    for (int k = 0; k < 9; k++) p[k] = (k == 4) ? 255 : 0;
    window(p, 1'b1);
    for (int k = 0; k < 9; k++) p[k] = (k == 4) ? 0 : 255;
    window(p, 1'b1);
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < 9; k++) p[k] = $urandom_range(0, 255);
      window(p, t[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
