// tb_rram_cell -- programs the cell with random pulse staircases and checks
// that it keeps the largest level (scale-to-max), that pulses without the
// word line or below the stored level change nothing, that the read current
// equals the device-equation conductance only with word line and read
// voltage present, and that set returns it to the lowest state.
module tb_rram_cell;
  import tb_ref_pkg::*;
  logic clk = 0, set = 0, wl = 0, pulse = 0, rd = 0;
  logic [3:0] amp = 0, lvl;
  logic [15:0] i_sl;
  int checks = 0, failures = 0;
  int held = 0;

  always #5 clk = ~clk;

  rram_cell dut (.clk, .set_i(set), .wl_i(wl), .pulse_i(pulse), .amp_i(amp),
                 .read_i(rd), .i_sl_o(i_sl), .lvl_o(lvl));

  task automatic check(string what, int got, int expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, expv);
    end
  endtask

  // Staircase of q pulses, amplitudes 1..q, over 15 slots.
  task automatic staircase(int q, logic wl_on);
    for (int j = 1; j <= 15; j++) begin
      @(negedge clk);
      wl = wl_on; pulse = (j <= q); amp = (j <= q) ? 4'(j) : 4'(0);
    end
    @(negedge clk); wl = 0; pulse = 0; amp = 0;
  endtask

  task automatic read_check(int l);
    @(negedge clk); rd = 1; wl = 0; #1;
    check("no wl current", int'(i_sl), 0);
    wl = 1; #1;
    check("level", int'(lvl), l);
    check("current", int'(i_sl), g_of_level(l));
    wl = 0; rd = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mx, q;
    @(negedge clk); set = 1;
    @(negedge clk); set = 0;
    read_check(0);
    // every level reachable from the lowest state
    for (int l = 0; l < 16; l++) begin
      @(negedge clk); set = 1;
      @(negedge clk); set = 0;
      staircase(l, 1);
      read_check(l);
    end
    // random sprays: running maximum
    for (int s = 0; s < 20; s++) begin
      @(negedge clk); set = 1;
      @(negedge clk); set = 0;
      mx = 0;
      for (int k = 0; k < 8; k++) begin
        q = $urandom_range(0, 15);
        if (q < mx) held++;
        mx = (q > mx) ? q : mx;
        staircase(q, 1);
        check("running max", int'(lvl), mx);
      end
      staircase(15, 0);            // word line closed: no change
      read_check(mx);
    end
    checks++;
    if (held == 0) begin failures++; $display("no max-hold case exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
