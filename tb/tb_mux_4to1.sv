// Testbench of the 4:1 output multiplexer: result pixel and ready flag of
// the selected unit pass through; the write address is the zoom unit's for
// zoom and the window centre otherwise.
module tb_mux_4to1;
  import impro_pkg::*;

  op_e          sel;
  pixel_t [3:0] din;
  logic   [3:0] rdy_in;
  addr_t        adin, zoom_adout, adout;
  pixel_t       dout;
  logic         d_rdy;
  int           checks = 0, failures = 0;

  mux_4to1 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      sel = op_e'(t % 4);
      for (int l = 0; l < 4; l++) din[l] = pixel_t'($urandom);
      rdy_in = 4'($urandom);
      adin = addr_t'($urandom);
      zoom_adout = addr_t'($urandom);
      #1;
      checks++;
      if (dout !== din[t % 4] || d_rdy !== rdy_in[t % 4] ||
          adout !== ((t % 4 == 3) ? zoom_adout : adin)) begin
        failures++;
        $display("FAIL sel %0d", t % 4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
