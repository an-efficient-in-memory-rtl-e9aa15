// tb_pulse_encoder -- for every level q: one load, then exactly 15 busy
// slots carrying q pulses with amplitudes 1, 2, ..., q, then idle.  Also a
// reload in the middle of a train restarts it.
module tb_pulse_encoder;
  logic clk = 0, rst_n = 0, load = 0;
  logic [3:0] lvl, amp;
  logic pulse, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pulse_encoder dut (.clk, .rst_n, .load_i(load), .lvl_i(lvl),
                     .pulse_o(pulse), .amp_o(amp), .busy_o(busy));

  task automatic check(string what, int got, int expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, expv);
    end
  endtask

  task automatic run_train(int q, int slots);
    int npulse;
    @(negedge clk); load = 1; lvl = 4'(q);
    @(negedge clk); load = 0; lvl = 4'($urandom);
    npulse = 0;
    for (int j = 1; j <= slots; j++) begin
      check("busy", int'(busy), 1);
      check("pulse", int'(pulse), int'(j <= q));
      if (pulse) begin
        npulse++;
        check("amp", int'(amp), j);
      end
      if (j < slots) @(negedge clk);
    end
    if (slots == 15) begin
      check("pulse count", npulse, q);
      @(negedge clk);
      check("idle busy", int'(busy), 0);
      check("idle pulse", int'(pulse), 0);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lvl = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset idle", int'(busy), 0);
    for (int q = 0; q < 16; q++) run_train(q, 15);
    run_train(9, 6);     // interrupted ...
    run_train(4, 15);    // ... and restarted
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
