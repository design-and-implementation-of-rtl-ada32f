// Testbench of the two-bank memory unit at full size: random writes to both
// banks, then read-back of every written location with one cycle of read
// latency; the two banks must be independent (same address, different data).
module tb_memory_bank;

  logic        clk = 1'b0, mb_sel = 1'b0, we = 1'b0;
  logic [15:0] address = '0;
  logic [7:0]  data_in = '0, dataout;
  int          checks = 0, failures = 0;

  memory_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] model [2][int];

  initial begin
    int a;
    for (int t = 0; t < 2000; t++) begin
      a = (t < 1000) ? $urandom_range(0, 65535) : (t % 1000) * 37;
      @(negedge clk);
      we = 1'b1; mb_sel = t[0]; address = 16'(a); data_in = 8'($urandom);
      model[t[0]][a] = data_in;
    end
    @(negedge clk); we = 1'b0;
    for (int b = 0; b < 2; b++)
      foreach (model[b][k]) begin
        mb_sel = b[0]; address = 16'(k);
        @(negedge clk);
        checks++;
        if (dataout !== model[b][k]) begin
          failures++;
          $display("FAIL bank %0d addr %0d: %0h expected %0h", b + 1, k, dataout, model[b][k]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
