// Testbench of the memory interface: random combinations of requests check
// the port grant order (result write, pixel read, clearing write, external
// access), the bank selected and the data written; read data must reach the
// processing unit with `pen` one cycle after a pixel read.
module tb_memory_read_write;
  import impro_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   ext_en, ext_bank, ext_we, clr_en, rd_en, d_rdy;
  addr_t  ext_addr, clr_addr, rd_addr, wr_addr, mem_addr;
  pixel_t ext_din, prout, memin, mem_din, prin;
  logic   mem_we, mem_sel, pen;
  int     checks = 0, failures = 0;

  memory_read_write dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t  e_addr;
    logic   e_we, e_sel, prev_rd;
    pixel_t e_din;
    {ext_en, ext_bank, ext_we, clr_en, rd_en, d_rdy} = '0;
    {ext_addr, clr_addr, rd_addr, wr_addr} = '0;
    {ext_din, prout, memin} = '0;
    prev_rd = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      ext_en = 1'($urandom); ext_bank = 1'($urandom); ext_we = 1'($urandom);
      clr_en = 1'($urandom); rd_en = 1'($urandom); d_rdy = 1'($urandom) && !rd_en;
      ext_addr = addr_t'($urandom); clr_addr = addr_t'($urandom);
      rd_addr = addr_t'($urandom); wr_addr = addr_t'($urandom);
      ext_din = pixel_t'($urandom); prout = pixel_t'($urandom); memin = pixel_t'($urandom);
      #1;
      if (d_rdy)        begin e_addr = wr_addr;  e_we = 1; e_sel = 1; e_din = prout; end
      else if (rd_en)   begin e_addr = rd_addr;  e_we = 0; e_sel = 0; e_din = 0; end
      else if (clr_en)  begin e_addr = clr_addr; e_we = 1; e_sel = 1; e_din = 0; end
      else if (ext_en)  begin e_addr = ext_addr; e_we = ext_we; e_sel = ext_bank; e_din = ext_din; end
      else              begin e_addr = 0; e_we = 0; e_sel = 0; e_din = 0; end
      checks++;
      if (mem_addr !== e_addr || mem_we !== e_we || mem_sel !== e_sel || (e_we && mem_din !== e_din)) begin
        failures++;
        $display("FAIL grant t=%0d", t);
      end
      checks++;
      if (pen !== prev_rd || prin !== memin) begin failures++; $display("FAIL pen t=%0d", t); end
      prev_rd = rd_en;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
