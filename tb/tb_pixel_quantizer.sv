// tb_pixel_quantizer -- exhaustive check of the 8-bit to 4-bit quantizer
// against a nearest-level search.
module tb_pixel_quantizer;
  import tb_ref_pkg::*;
  logic [7:0] pix;
  logic [3:0] lvl;
  int checks = 0, failures = 0;

  pixel_quantizer dut (.pix_i(pix), .lvl_o(lvl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 256; p++) begin
      pix = 8'(p);
      #1;
      checks++;
      if (int'(lvl) != quant(p)) begin
        failures++;
        $display("pix %0d: got %0d expected %0d", p, lvl, quant(p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
