// tb_sense_integrator -- random source-line currents summed over random
// windows, clear, hold while not integrating, and saturation at full scale
// (small converter width).
module tb_sense_integrator;
  localparam int IW = 21, CW = 24, CWS = 18;
  logic clk = 0, clr = 0, integ = 0;
  logic [IW-1:0] i_sl;
  logic [CW-1:0] ch;
  logic [CWS-1:0] chs;
  int checks = 0, failures = 0;
  longint acc;
  int sat_seen = 0;

  always #5 clk = ~clk;

  sense_integrator #(.IW(IW), .CW(CW)) dut (.clk, .clear_i(clr), .integrate_i(integ),
                                             .i_sl_i(i_sl), .charge_o(ch));
  sense_integrator #(.IW(IW), .CW(CWS)) dut_s (.clk, .clear_i(clr), .integrate_i(integ),
                                                .i_sl_i(i_sl), .charge_o(chs));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len;
    i_sl = 0;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk); clr = 1; integ = 0;
      @(negedge clk); clr = 0;
      acc = 0;
      len = $urandom_range(1, 8);
      for (int k = 0; k < len; k++) begin
        integ = 1;
        i_sl = IW'($urandom_range(0, 25 * 63694));
        acc += longint'(i_sl);
        @(negedge clk);
        integ = ($urandom_range(0, 3) == 0) ? 1'b0 : 1'b1;
        if (!integ) begin
          i_sl = IW'($urandom);       // ignored while not integrating
          @(negedge clk);
        end
      end
      integ = 0;
      @(negedge clk);
      checks++;
      if (longint'(ch) != acc) begin
        failures++;
        $display("window %0d: got %0d expected %0d", t, ch, acc);
      end
      checks++;
      if (acc >= (longint'(1) << CWS)) sat_seen++;
      if (longint'(chs) != ((acc >= (longint'(1) << CWS)) ? (longint'(1) << CWS) - 1 : acc)) begin
        failures++;
        $display("saturating window %0d: got %0d for %0d", t, chs, acc);
      end
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
