// Testbench of the zoom-by-replication unit: for random pixels and block
// addresses, d_rdy must be high for exactly four cycles after the input,
// carrying the pixel to the top-left, top-right, bottom-left and
// bottom-right positions of its 2x2 block. A reset pulse must abort a block.
module tb_zoom_filter;
  import impro_pkg::*;

  localparam int N = 16;

  logic   clk = 1'b0, rst_n = 1'b0, rst = 1'b0, en = 1'b0;
  pixel_t din = '0, dout;
  addr_t  adin = '0, adout;
  logic   d_rdy;
  int     checks = 0, failures = 0;

  zoom_filter #(.IMG_N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int offs[4];
    int a;
    pixel_t v;
    offs = '{0, 1, N, N + 1};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      v = pixel_t'($urandom_range(0, 255));
      a = 2 * N * $urandom_range(0, N / 2 - 1) + 2 * $urandom_range(0, N / 2 - 1);
      en = 1'b1; din = v; adin = addr_t'(a);
      @(negedge clk);
      en = 1'b0; din = ~v; adin = '0;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (!d_rdy || dout !== v || adout !== addr_t'(a + offs[k])) begin
          failures++;
          $display("FAIL write %0d: rdy=%0d dout=%0d adout=%0d expected %0d at %0d",
                   k, d_rdy, dout, adout, v, a + offs[k]);
        end
        @(negedge clk);
      end
      checks++;
      if (d_rdy) begin failures++; $display("FAIL fifth write"); end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    // Reset pulse in the middle of a block.
    en = 1'b1; din = 8'h5A; adin = '0;
    @(negedge clk); en = 1'b0;
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    checks++;
    if (d_rdy) begin failures++; $display("FAIL reset did not abort"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
