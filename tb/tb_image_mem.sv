// tb_image_mem -- fills the full 256x256 store with a pattern pixel by
// pixel, then reads every row back (one-cycle latency) and compares.
module tb_image_mem;
  localparam int W = 256, H = 256;
  logic clk = 0;
  logic we, re;
  logic [7:0] wrow, wcol, rrow, wdata;
  logic [W-1:0][7:0] rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  image_mem dut (.clk, .we_i(we), .wrow_i(wrow), .wcol_i(wcol), .wdata_i(wdata),
                 .re_i(re), .rrow_i(rrow), .rdata_o(rdata));

  function automatic logic [7:0] pat(int r, int c);
    return 8'((r * 37) ^ (c * 11) ^ (r >> 3));
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad;
    we = 0; re = 0; wrow = 0; wcol = 0; wdata = 0; rrow = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        we = 1; wrow = 8'(r); wcol = 8'(c); wdata = pat(r, c);
      end
    @(negedge clk); we = 0;
    for (int r = H - 1; r >= 0; r--) begin
      @(negedge clk); re = 1; rrow = 8'(r);
      @(negedge clk); re = 0; rrow = 8'(r + 1);   // data must hold without re
      @(negedge clk);
      bad = 0;
      for (int c = 0; c < W; c++) if (rdata[c] != pat(r, c)) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("row %0d: %0d pixels wrong", r, bad); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
