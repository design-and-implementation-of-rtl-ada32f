// End-to-end testbench of the Im-Pro II processor at a reduced image size.
//
// Loads a test image through the external port, runs low-pass, high-pass,
// high-boost and zoom operations, reads bank 2 back and compares every pixel
// with the reference model (border pixels of filtered images must be 0).
// It also checks the number of cycles from start to done and counts how
// often each mechanism occurred: low-pass saturation, high-pass and
// high-boost clipping of negative and of too-large results, zoom
// replication, and clearing of a previous result before a filter run. A
// mechanism that never occurred counts as a failure.
module tb_impro2_top;
  import impro_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;
  localparam int C = 2;
  localparam int NPIX = N * N;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  logic [1:0] opcode = '0;
  addr_t      ext_addr = '0;
  logic       ext_bank = 1'b0;
  logic       ext_we = 1'b0;
  pixel_t     ext_din = '0;
  pixel_t     ext_dout;
  logic       busy, done;

  impro2_top #(.IMG_N(N), .HBF_C(C)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img[NPIX];
  int src[NPIX / 4];
  int res[NPIX];
  int n_lpf_sat = 0, n_hpf_neg = 0, n_hpf_sat = 0, n_hbf_neg = 0, n_hbf_sat = 0;
  int n_zoom = 0, n_cleared = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic write_px(bit bank, int addr, int data);
    @(negedge clk);
    ext_bank = bank; ext_addr = addr_t'(addr); ext_din = pixel_t'(data); ext_we = 1'b1;
    @(negedge clk);
    ext_we = 1'b0;
  endtask

  task automatic read_bank(bit bank, int n);
    @(negedge clk);
    ext_we = 1'b0; ext_bank = bank; ext_addr = '0;
    for (int a = 0; a < n; a++) begin
      @(negedge clk);
      res[a] = int'(ext_dout);
      ext_addr = addr_t'(a + 1);
    end
  endtask

  task automatic run_op(op_e op, int windows, int period);
    int cyc;
    @(negedge clk);
    opcode = op; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    check(busy, "busy high after start");
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == NPIX + windows * period,
          $sformatf("op %0d took %0d cycles, expected %0d", op, cyc, NPIX + windows * period));
    @(negedge clk);
    check(!busy, "busy low after done");
  endtask

  task automatic check_filter(op_e op);
    int p[9];
    int exp_v, raw;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        if (i == 0 || j == 0 || i == N - 1 || j == N - 1) begin
          exp_v = 0;
        end else begin
          for (int k = 0; k < 9; k++) p[k] = img[(i + k / 3 - 1) * N + (j + k % 3 - 1)];
          raw = raw_value(int'(op), C, p);
          exp_v = clip8(raw);
          if (op == OP_LPF && raw > 255) n_lpf_sat++;
          if (op == OP_HPF && raw < 0)   n_hpf_neg++;
          if (op == OP_HPF && raw > 255) n_hpf_sat++;
          if (op == OP_HBF && raw < 0)   n_hbf_neg++;
          if (op == OP_HBF && raw > 255) n_hbf_sat++;
        end
        check(res[i * N + j] == exp_v,
              $sformatf("op %0d pixel (%0d,%0d) = %0d, expected %0d", op, i, j, res[i * N + j], exp_v));
      end
  endtask

  initial begin
    // Test image: random pixels, a bright block and isolated dark and
    // bright pixels, so that every clipping case occurs.
    for (int a = 0; a < NPIX; a++) img[a] = $urandom_range(0, 255);
    for (int i = 2; i < 7; i++)
      for (int j = 2; j < 7; j++) img[i * N + j] = $urandom_range(240, 255);
    img[4 * N + 4] = 5;
    img[10 * N + 10] = 255;
    for (int k = 0; k < 8; k++) img[(9 + k / 3) * N + 9 + k % 3] = (k == 4) ? 255 : 10;
    for (int a = 0; a < NPIX / 4; a++) src[a] = $urandom_range(0, 255);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int a = 0; a < NPIX; a++) write_px(1'b0, a, img[a]);
    read_bank(1'b0, NPIX);
    for (int a = 0; a < NPIX; a++) check(res[a] == img[a], "load of bank 1");

    run_op(OP_LPF, (N - 2) * (N - 2), FILT_PERIOD);
    read_bank(1'b1, NPIX);
    check_filter(OP_LPF);

    run_op(OP_HPF, (N - 2) * (N - 2), FILT_PERIOD);
    read_bank(1'b1, NPIX);
    check_filter(OP_HPF);

    run_op(OP_HBF, (N - 2) * (N - 2), FILT_PERIOD);
    read_bank(1'b1, NPIX);
    check_filter(OP_HBF);

    // Zoom: the (N/2) x (N/2) source image is stored row by row in bank 1.
    for (int a = 0; a < NPIX / 4; a++) write_px(1'b0, a, src[a]);
    run_op(OP_ZOOM, NPIX / 4, ZOOM_PERIOD);
    read_bank(1'b1, NPIX);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        check(res[i * N + j] == src[(i / 2) * (N / 2) + j / 2],
              $sformatf("zoom pixel (%0d,%0d)", i, j));
    for (int a = 0; a < NPIX / 4; a++) if (src[a] != 0) n_zoom++;

    // A filter after zoom: the zoomed border must be cleared to 0.
    for (int a = 0; a < NPIX / 4; a++) write_px(1'b0, a, img[a]);
    run_op(OP_HPF, (N - 2) * (N - 2), FILT_PERIOD);
    read_bank(1'b1, NPIX);
    for (int j = 0; j < N; j++) if (src[j / 2] != 0 && res[j] == 0) n_cleared++;
    check_filter(OP_HPF);

    check(n_lpf_sat > 0, "LPF saturation never happened");
    check(n_hpf_neg > 0, "HPF negative clip never happened");
    check(n_hpf_sat > 0, "HPF saturation never happened");
    check(n_hbf_neg > 0, "HBF negative clip never happened");
    check(n_hbf_sat > 0, "HBF saturation never happened");
    check(n_zoom > 0, "zoom replication never happened");
    check(n_cleared > 0, "clearing of an old result never happened");
    $display("mechanisms: lpf_sat=%0d hpf_neg=%0d hpf_sat=%0d hbf_neg=%0d hbf_sat=%0d zoom=%0d cleared=%0d",
             n_lpf_sat, n_hpf_neg, n_hpf_sat, n_hbf_neg, n_hbf_sat, n_zoom, n_cleared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
