// tb_average_resample -- random spray-maximum sets (N=25) turned into the
// integrated charge the macro core would produce (TI=4), plus random target
// pixels; output pixel and white reference compared with a reference built
// from the device equation, nearest-level search and saturating division.
// Also checks the two-cycle latency at one pixel per cycle.
module tb_average_resample;
  import tb_ref_pkg::*;
  localparam int NS = 25, TI = 4, CW = 24, NT = 3000;
  logic clk = 0, rst_n = 0, iv = 0, ov;
  logic [CW-1:0] charge;
  logic [7:0] pix, opix;
  logic [3:0] ow;
  int checks = 0, failures = 0;
  int exp_pix [NT], exp_w [NT];
  int n_in = 0, n_out = 0, sat = 0, wzero = 0;

  always #5 clk = ~clk;

  average_resample dut (.clk, .rst_n, .in_valid_i(iv), .charge_i(charge), .pix_i(pix),
                        .out_valid_o(ov), .out_pix_o(opix), .out_w_o(ow));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output side
  always @(posedge clk) if (rst_n && ov) begin
    checks++;
    if (int'(opix) != exp_pix[n_out] || int'(ow) != exp_w[n_out]) begin
      failures++;
      $display("pixel %0d: got %0d/w%0d expected %0d/w%0d", n_out, opix, ow,
               exp_pix[n_out], exp_w[n_out]);
    end
    n_out++;
  end

  initial begin
    longint sum;
    int q, lo, w, p;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      @(negedge clk);
      p  = $urandom_range(0, 255);
      lo = (t % 10 == 0) ? 0 : quant(p);      // spray maxima are >= the target
      sum = 0;
      for (int s = 0; s < NS; s++) begin
        q = (t % 10 == 0) ? 0 : $urandom_range(lo, (t % 3 == 0) ? lo + 2 > 15 ? 15 : lo + 2 : 15);
        sum += longint'(g_of_level(q));
      end
      w = level_of_g((sum * TI) / (NS * TI));
      exp_w[t]   = w;
      exp_pix[t] = resample(p, w);
      if (exp_pix[t] == 255 && p * 15 / ((w == 0) ? 1 : w) > 255) sat++;
      if (w == 0) wzero++;
      iv = 1; charge = CW'(sum * TI); pix = 8'(p);
      n_in++;
    end
    @(negedge clk); iv = 0;
    // latency: last output two cycles after the last input
    @(posedge clk); #1;
    checks++;
    if (n_out != NT - 1) begin failures++; $display("latency: %0d outputs after 1 cycle", n_out); end
    @(posedge clk); #1;
    checks++;
    if (n_out != NT) begin failures++; $display("only %0d of %0d outputs", n_out, NT); end
    checks++;
    if (sat == 0 || wzero == 0) begin failures++; $display("saturation %0d, w=0 %0d", sat, wzero); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
