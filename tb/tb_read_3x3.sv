// Testbench of the pixel reader on a 16 x 16 image: after `sel` with a
// centre address, the nine neighbourhood addresses must come out in
// increasing (row-major) order on consecutive cycles with rd_en high, and
// rd_en must then drop. In zoom mode one read of the source address must be
// issued and zoom_address must be the top-left of its 2x2 output block.
module tb_read_3x3;
  import impro_pkg::*;

  localparam int N = 16;

  logic  clk = 1'b0, rst_n = 1'b0, sel = 1'b0, zoom = 1'b0;
  addr_t adin = '0, rd_addr, center_addr, zoom_address;
  logic  rd_en, busy;
  int    checks = 0, failures = 0;

  read_3x3 #(.IMG_N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i, j, c, s;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      i = $urandom_range(1, N - 2);
      j = $urandom_range(1, N - 2);
      c = i * N + j;
      @(negedge clk); zoom = 1'b0; adin = addr_t'(c); sel = 1'b1;
      @(negedge clk); sel = 1'b0; adin = '0;
      for (int di = -1; di <= 1; di++)
        for (int dj = -1; dj <= 1; dj++) begin
          checks++;
          if (!rd_en || rd_addr !== addr_t'((i + di) * N + j + dj) || center_addr !== addr_t'(c)) begin
            failures++;
            $display("FAIL centre %0d offset (%0d,%0d): %0d", c, di, dj, rd_addr);
          end
          @(negedge clk);
        end
      checks++;
      if (rd_en) begin failures++; $display("FAIL tenth read"); end
    end
    for (int t = 0; t < 100; t++) begin
      s = $urandom_range(0, N * N / 4 - 1);
      @(negedge clk); zoom = 1'b1; adin = addr_t'(s); sel = 1'b1;
      @(negedge clk); sel = 1'b0;
      checks++;
      if (!rd_en || rd_addr !== addr_t'(s) ||
          zoom_address !== addr_t'(2 * (s / (N / 2)) * N + 2 * (s % (N / 2)))) begin
        failures++;
        $display("FAIL zoom source %0d: read %0d dest %0d", s, rd_addr, zoom_address);
      end
      @(negedge clk);
      checks++;
      if (rd_en) begin failures++; $display("FAIL second zoom read"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
