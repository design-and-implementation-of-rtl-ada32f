// Testbench of the 1:4 input demultiplexer: for every select value and
// random pixels, only the selected lane carries the pixel and the enable.
module tb_demux_1to4;
  import impro_pkg::*;

  op_e          sel;
  logic         en;
  pixel_t       pixin;
  logic   [3:0] en_out;
  pixel_t [3:0] pix_out;
  int           checks = 0, failures = 0;

  demux_1to4 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      sel = op_e'(t % 4);
      en = t[2];
      pixin = pixel_t'($urandom_range(1, 255));
      #1;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (l == t % 4) begin
          if (en_out[l] !== en || pix_out[l] !== pixin) failures++;
        end else if (en_out[l] !== 1'b0 || pix_out[l] !== '0) begin
          failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
