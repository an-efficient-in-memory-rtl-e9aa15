// tb_wl_decoder -- every address with the decoder enabled, disabled and in
// all-rows mode, for the default 25 word lines.
module tb_wl_decoder;
  localparam int ROWS = 25;
  logic en, all;
  logic [4:0] row;
  logic [ROWS-1:0] wl, expv;
  int checks = 0, failures = 0;

  wl_decoder dut (.en_i(en), .all_i(all), .row_i(row), .wl_o(wl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++)
      for (int r = 0; r < 32; r++) begin
        en = m[0]; all = m[1]; row = 5'(r);
        #1;
        expv = '0;
        if (en && all) expv = '1;
        else if (en && r < ROWS) expv[r] = 1'b1;
        checks++;
        if (wl !== expv) begin
          failures++;
          $display("en=%0d all=%0d row=%0d: got %h expected %h", en, all, r, wl, expv);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
