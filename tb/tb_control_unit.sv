// Testbench of the control unit on an 8 x 8 image, with a memory model and a
// simple processing-unit model around it. The processing model returns, per
// filter window, the 8-bit sum of the nine pixels it received (so the order
// and addresses of the reads are checked through the result), and for zoom
// four writes of its input pixel to the 2x2 block at `padin`. The test
// checks the cleared border, every written result, that each window begins
// with a reset pulse, the start-to-done cycle count and the external port.
module tb_control_unit;
  import impro_pkg::*;

  localparam int N = 8;
  localparam int NPIX = N * N;

  logic   clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  op_e    opcode = OP_LPF;
  logic   busy, done;
  addr_t  ext_addr = '0;
  logic   ext_bank = 1'b0, ext_we = 1'b0;
  pixel_t ext_din = '0;
  addr_t  mem_addr;
  logic   mem_we, mem_sel;
  pixel_t mem_din, memin;
  op_e    p_op;
  logic   prst, pen;
  pixel_t prin;
  addr_t  padin;
  pixel_t prout;
  addr_t  padout;
  logic   pd_rdy;
  int     checks = 0, failures = 0;

  control_unit #(.IMG_N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Memory model: two banks, synchronous read.
  pixel_t bank [2][NPIX];
  always_ff @(posedge clk) begin
    if (mem_we) bank[mem_sel][int'(mem_addr) % NPIX] <= mem_din;
    memin <= bank[mem_sel][int'(mem_addr) % NPIX];
  end

  // Processing-unit model.
  int     psum, pcnt, zleft, n_prst;
  pixel_t zpix;
  addr_t  zbase;
  always_ff @(posedge clk) begin
    pd_rdy <= 1'b0;
    if (prst) begin
      psum <= 0; pcnt <= 0; n_prst <= n_prst + 1;
    end else if (pen && p_op != OP_ZOOM) begin
      psum <= psum + int'(prin);
      pcnt <= pcnt + 1;
      if (pcnt == 8) begin
        pd_rdy <= 1'b1;
        prout  <= pixel_t'(psum + int'(prin));
        padout <= padin;
      end
    end else if (pen) begin
      pd_rdy <= 1'b1; prout <= prin; padout <= padin;
      zpix <= prin; zbase <= padin; zleft <= 3;
    end
    if (zleft > 0) begin
      pd_rdy <= 1'b1;
      prout  <= zpix;
      padout <= zbase + addr_t'((4 - zleft) % 2 + ((4 - zleft) / 2) * N);
      zleft  <= zleft - 1;
    end
  end

  int img[NPIX];

  task automatic run(op_e op, int windows, int period);
    int cyc;
    n_prst = 0;
    @(negedge clk); opcode = op; start = 1'b1;
    @(negedge clk); start = 1'b0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != NPIX + windows * period) begin
      failures++; $display("FAIL op %0d took %0d cycles", op, cyc);
    end
    checks++;
    if (n_prst != windows) begin failures++; $display("FAIL %0d reset pulses for %0d windows", n_prst, windows); end
    @(negedge clk);
  endtask

  initial begin
    int e, s;
    psum = 0; pcnt = 0; zleft = 0; n_prst = 0; pd_rdy = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Load bank 1 and put garbage in bank 2 through the external port.
    for (int a = 0; a < NPIX; a++) begin
      img[a] = $urandom_range(0, 255);
      @(negedge clk); ext_we = 1'b1; ext_bank = 1'b0; ext_addr = addr_t'(a); ext_din = pixel_t'(img[a]);
      @(negedge clk); ext_bank = 1'b1; ext_din = 8'hEE;
    end
    @(negedge clk); ext_we = 1'b0;
    checks++;
    if (bank[0][5] !== pixel_t'(img[5]) || bank[1][5] !== 8'hEE) begin failures++; $display("FAIL external write"); end

    run(OP_HPF, (N - 2) * (N - 2), FILT_PERIOD);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        e = 0;
        if (i > 0 && j > 0 && i < N - 1 && j < N - 1) begin
          s = 0;
          for (int k = 0; k < 9; k++) s += img[(i + k / 3 - 1) * N + j + k % 3 - 1];
          e = s % 256;
        end
        checks++;
        if (bank[1][i * N + j] !== pixel_t'(e)) begin
          failures++; $display("FAIL filter (%0d,%0d) %0d expected %0d", i, j, bank[1][i * N + j], e);
        end
      end

    run(OP_ZOOM, NPIX / 4, ZOOM_PERIOD);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (bank[1][i * N + j] !== pixel_t'(img[(i / 2) * (N / 2) + j / 2])) begin
          failures++; $display("FAIL zoom (%0d,%0d)", i, j);
        end
      end

    // External read of bank 2 when idle.
    @(negedge clk); ext_bank = 1'b1; ext_addr = addr_t'(N + 3);
    @(negedge clk);
    checks++;
    if (memin !== bank[1][N + 3] || busy) begin failures++; $display("FAIL external read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
