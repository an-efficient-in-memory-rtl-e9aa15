// tb_rsr_imc_top -- end-to-end run of the retinex engine at reduced size
// (8x4 image, N=3 sprays of n=5 points, 2 read cycles, 4-bit offsets).
// Three images are enhanced back to back: a random one, one with a bright
// band and one that is almost black.  Every output pixel and white
// reference is compared with a model that redraws the same sprays, takes the
// spray maxima of the quantized pixels, sums the device-equation
// conductances, averages, picks the nearest level and rescales the target.
// The run also checks raster order, the busy time of N*(n+1)*17 + W + TI + 4
// cycles per row, one done pulse per image, and that each mechanism of the
// design occurred: spray points outside the image, stored maxima that a
// later smaller point left unchanged, saturated outputs and the w = 0 guard.
module tb_rsr_imc_top;
  import tb_ref_pkg::*;
  localparam int W = 8, H = 4, NS = 3, NP = 5, TI = 2, OW = 4;
  localparam logic [31:0] SEED = 32'hC0FF_EE11;
  localparam int ROWLEN = 1 + NS * (NP + 1) * 17 + 1 + TI + 2 + W;
  logic clk = 0, rst_n = 0, we = 0, start = 0;
  logic [1:0] wrow, orow;
  logic [2:0] wcol, ocol;
  logic [7:0] wdata, opix;
  logic [3:0] ow;
  logic busy, done, ov;
  int checks = 0, failures = 0;
  int img [H][W];
  int exp_pix [H][W], exp_w [H][W];
  logic [31:0] st;
  int n_outside = 0, n_hold = 0, n_sat = 0, n_wzero = 0;

  always #5 clk = ~clk;

  rsr_imc_top #(.W(W), .H(H), .NS(NS), .NP(NP), .TI(TI), .OW(OW), .SEED(SEED)) dut (
    .clk, .rst_n, .img_we_i(we), .img_wrow_i(wrow), .img_wcol_i(wcol), .img_wdata_i(wdata),
    .start_i(start), .busy_o(busy), .done_o(done),
    .out_valid_o(ov), .out_row_o(orow), .out_col_o(ocol), .out_pix_o(opix), .out_w_o(ow));

  task automatic check(string what, int got, int expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, expv);
    end
  endtask

  // Reference model of one image, continuing the spray generator state.
  task automatic model();
    int dxs [NS][NP+1], dys [NS][NP+1];
    int mx, q, x, y;
    longint sum;
    for (int r = 0; r < H; r++) begin
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
            if (x >= 0 && x < W && y >= 0 && y < H) q = quant(img[y][x]);
            else begin q = 0; n_outside++; end
            if (k > 0 && q < mx) n_hold++;
            if (q > mx) mx = q;
          end
          sum += longint'(g_of_level(mx));
        end
        exp_w[r][c]   = level_of_g((sum * TI) / (NS * TI));
        exp_pix[r][c] = resample(img[r][c], exp_w[r][c]);
        if (exp_w[r][c] == 0) n_wzero++;
        if (img[r][c] * 15 / ((exp_w[r][c] == 0) ? 1 : exp_w[r][c]) > 255) n_sat++;
      end
    end
  endtask

  // output monitor
  int n_out = 0, n_done = 0, busy_cyc = 0;
  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cyc++;
    if (done) n_done++;
    if (ov) begin
      check("row order", int'(orow), n_out / W);
      check("col order", int'(ocol), n_out % W);
      check("pixel", int'(opix), exp_pix[orow][ocol]);
      check("white ref", int'(ow), exp_w[orow][ocol]);
      n_out++;
    end
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st = SEED;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          case (pass)
            0: img[r][c] = $urandom_range(0, 255);
            1: img[r][c] = (r == 1) ? $urandom_range(200, 255) : $urandom_range(0, 80);
            default: img[r][c] = $urandom_range(0, 8);
          endcase
          @(negedge clk);
          we = 1; wrow = 2'(r); wcol = 3'(c); wdata = 8'(img[r][c]);
        end
      @(negedge clk); we = 0;
      model();
      n_out = 0; n_done = 0; busy_cyc = 0;
      start = 1;
      @(negedge clk); start = 0;
      wait (n_done == 1);
      repeat (3) @(negedge clk);
      check("outputs per image", n_out, W * H);
      check("done pulses", n_done, 1);
      check("busy cycles", busy_cyc, H * ROWLEN);
    end
    $display("mechanisms: outside=%0d hold=%0d saturate=%0d wzero=%0d",
             n_outside, n_hold, n_sat, n_wzero);
    checks += 4;
    if (n_outside == 0) begin failures++; $display("no spray point outside the image"); end
    if (n_hold == 0)    begin failures++; $display("no max-hold case"); end
    if (n_sat == 0)     begin failures++; $display("no saturated output"); end
    if (n_wzero == 0)   begin failures++; $display("no w = 0 guard case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
