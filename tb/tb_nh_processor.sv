// Testbench of the neighbourhood processing unit: for each op-code, random
// windows are streamed in after a reset pulse, and the selected unit's
// result, ready flag and write address are checked against the reference
// model. Zoom inputs must give four writes to the 2x2 block.
module tb_nh_processor;
  import impro_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;
  localparam int C = 2;

  logic   clk = 1'b0, rst_n = 1'b0, rst = 1'b0, pen = 1'b0;
  op_e    opcode = OP_LPF;
  pixel_t pixin = '0, dout;
  addr_t  adin = '0, adout;
  logic   d_rdy;
  int     checks = 0, failures = 0;

  nh_processor #(.IMG_N(N), .HBF_C(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic filter_window(op_e op);
    int p[9];
    int a, exp_v;
    for (int k = 0; k < 9; k++) p[k] = $urandom_range(0, 255);
    a = $urandom_range(N + 1, 2 * N);
    @(negedge clk); opcode = op; adin = addr_t'(a); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    for (int k = 0; k < 9; k++) begin
      pen = 1'b1; pixin = pixel_t'(p[k]);
      @(negedge clk);
      checks++;
      if (d_rdy !== (k == 8)) begin failures++; $display("FAIL op %0d d_rdy at %0d", op, k); end
    end
    pen = 1'b0;
    exp_v = clip8(raw_value(int'(op), C, p));
    checks++;
    if (dout !== pixel_t'(exp_v) || adout !== addr_t'(a)) begin
      failures++;
      $display("FAIL op %0d: %0d@%0d expected %0d@%0d", op, dout, adout, exp_v, a);
    end
  endtask

  task automatic zoom_pixel();
    pixel_t v;
    int a;
    int offs[4];
    offs = '{0, 1, N, N + 1};
    v = pixel_t'($urandom);
    a = 2 * N * $urandom_range(0, N / 2 - 1) + 2 * $urandom_range(0, N / 2 - 1);
    @(negedge clk); opcode = OP_ZOOM; adin = addr_t'(a); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    pen = 1'b1; pixin = v;
    @(negedge clk); pen = 1'b0;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (!d_rdy || dout !== v || adout !== addr_t'(a + offs[k])) begin
        failures++;
        $display("FAIL zoom write %0d", k);
      end
      @(negedge clk);
    end
    checks++;
    if (d_rdy) failures++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      filter_window(OP_LPF);
      filter_window(OP_HPF);
      filter_window(OP_HBF);
      zoom_pixel();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
