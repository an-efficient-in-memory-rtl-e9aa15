// tb_mask_shifter -- random rows and offsets (both signs, beyond the row
// width, row outside the image) against a per-column index computation.
module tb_mask_shifter;
  localparam int W = 256;
  logic [W-1:0][7:0]  row_i, row_o;
  logic               ok;
  logic signed [8:0]  dx;
  int checks = 0, failures = 0;

  mask_shifter dut (.row_i(row_i), .row_ok_i(ok), .dx_i(dx), .row_o(row_o));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, idx, exp_v, bad;
    for (int t = 0; t < 300; t++) begin
      for (int c = 0; c < W; c++) row_i[c] = 8'($urandom);
      d  = (t < 3) ? (t - 1) * 256 : int'($urandom_range(0, 511)) - 256;
      if (t == 3) d = 255;
      dx = 9'(d);
      ok = (t % 17 != 5);
      #1;
      bad = 0;
      for (int c = 0; c < W; c++) begin
        idx   = c + d;
        exp_v = (ok && idx >= 0 && idx < W) ? int'(row_i[idx]) : 0;
        if (int'(row_o[c]) != exp_v) bad++;
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("dx=%0d ok=%0d: %0d columns wrong", d, ok, bad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
