// tb_rsr_imc_full -- the engine at its default size (256x256 image, N=25
// sprays of n=250 points, 16 levels) enhancing one synthetic image: a dark
// gradient with bright blocks.  The first ROWS_CHECKED rows of the output
// are compared pixel by pixel with the same reference model as the reduced
// end-to-end test, and their busy time with 1 + N*(n+1)*17 + 1 + TI + 2 + W
// cycles per row.  ROWS_CHECKED is 3 unless given as +rows=<n>; +rows=256
// checks the whole image (about 27.4 million clock cycles).
module tb_rsr_imc_full;
  import tb_ref_pkg::*;
  localparam int W = 256, H = 256, NS = 25, NP = 250, TI = 4, OW = 9;
  localparam logic [31:0] SEED = 32'h2545_F491;
  localparam int ROWLEN = 1 + NS * (NP + 1) * 17 + 1 + TI + 2 + W;
  int ROWS_CHECKED = 3;
  logic clk = 0, rst_n = 0, we = 0, start = 0;
  logic [7:0] wrow, orow, wcol, ocol, wdata, opix;
  logic [3:0] ow;
  logic busy, done, ov;
  int checks = 0, failures = 0;
  int img [H][W];
  int exp_pix [H][W], exp_w [H][W];
  logic [31:0] st;

  always #5 clk = ~clk;

  rsr_imc_top dut (
    .clk, .rst_n, .img_we_i(we), .img_wrow_i(wrow), .img_wcol_i(wcol), .img_wdata_i(wdata),
    .start_i(start), .busy_o(busy), .done_o(done),
    .out_valid_o(ov), .out_row_o(orow), .out_col_o(ocol), .out_pix_o(opix), .out_w_o(ow));

  task automatic check(string what, int got, int expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, expv);
    end
  endtask

  task automatic model();
    int dxs [NS][NP+1], dys [NS][NP+1];
    int mx, q, x, y;
    longint sum;
    for (int r = 0; r < ROWS_CHECKED; r++) begin
      for (int s = 0; s < NS; s++)
        for (int k = 0; k <= NP; k++)
          if (k == 0) begin dxs[s][k] = 0; dys[s][k] = 0; end
          else begin
            st = xorshift(st);
            dxs[s][k] = int'($signed(st[OW-1:0]));
            dys[s][k] = int'($signed(st[16 +: OW]));
          end
      for (int c = 0; c < W; c++) begin
        sum = 0;
        for (int s = 0; s < NS; s++) begin
          mx = 0;
          for (int k = 0; k <= NP; k++) begin
            x = c + dxs[s][k]; y = r + dys[s][k];
            q = (x >= 0 && x < W && y >= 0 && y < H) ? quant(img[y][x]) : 0;
            if (q > mx) mx = q;
          end
          sum += longint'(g_of_level(mx));
        end
        exp_w[r][c]   = level_of_g((sum * TI) / (NS * TI));
        exp_pix[r][c] = resample(img[r][c], exp_w[r][c]);
      end
    end
  endtask

  int n_out = 0, busy_cyc = 0, n_changed = 0;
  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cyc++;
    if (ov) begin
      if (int'(orow) < ROWS_CHECKED) begin
        check("row order", int'(orow), n_out / W);
        check("col order", int'(ocol), n_out % W);
        check("pixel", int'(opix), exp_pix[orow][ocol]);
        check("white ref", int'(ow), exp_w[orow][ocol]);
        if (int'(opix) != img[orow][ocol]) n_changed++;
      end
      n_out++;
    end
  end

  initial begin
    void'($value$plusargs("rows=%d", ROWS_CHECKED));
    #1;
    repeat (ROWS_CHECKED * ROWLEN + W * H + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st = SEED;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        img[r][c] = (r / 4) + (c / 8);                              // dark gradient
        if (((r / 32) + (c / 32)) % 5 == 0) img[r][c] = 150 + (c % 100);  // bright blocks
        @(negedge clk);
        we = 1; wrow = 8'(r); wcol = 8'(c); wdata = 8'(img[r][c]);
      end
    @(negedge clk); we = 0;
    model();
    busy_cyc = 0;
    start = 1;
    @(negedge clk); start = 0;
    wait (n_out == ROWS_CHECKED * W);
    // the last pixel leaves two cycles after it was issued
    check("busy cycles", busy_cyc, ROWS_CHECKED * ROWLEN + ((ROWS_CHECKED < H) ? 2 : 0));
    checks++;
    if (n_changed == 0) begin failures++; $display("enhancement changed no pixel"); end
    $display("rows checked %0d, pixels changed %0d", ROWS_CHECKED, n_changed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
