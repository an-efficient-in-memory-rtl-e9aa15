// tb_spray_generator -- walks two complete spray sets (N=3 sprays of n=4
// points plus the target) and compares every point with an xorshift model:
// target first with offset 0, then fresh random offsets, spray and point
// counters, the last flag, and that next_i stops at the last point.
module tb_spray_generator;
  import tb_ref_pkg::*;
  localparam int NS = 3, NP = 4, OW = 9;
  localparam logic [31:0] SEED = 32'h1234_5678;
  logic clk = 0, rst_n = 0, start = 0, nxt = 0;
  logic signed [OW-1:0] dx, dy;
  logic [1:0] spray;
  logic [2:0] point;
  logic target, last;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spray_generator #(.NS(NS), .NP(NP), .OW(OW), .SEED(SEED)) dut (
    .clk, .rst_n, .start_i(start), .next_i(nxt),
    .dx_o(dx), .dy_o(dy), .spray_o(spray), .point_o(point), .target_o(target), .last_o(last));

  task automatic check(string what, int got, int expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, expv);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] st;
    int neg_seen, pos_seen;
    neg_seen = 0;
    pos_seen = 0;
    st = SEED;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int img_row = 0; img_row < 2; img_row++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int s = 0; s < NS; s++)
        for (int k = 0; k <= NP; k++) begin
          check("spray", int'(spray), s);
          check("point", int'(point), k);
          check("target", int'(target), int'(k == 0));
          check("last", int'(last), int'(s == NS - 1 && k == NP));
          if (k == 0) begin
            check("dx0", int'(dx), 0);
            check("dy0", int'(dy), 0);
          end else begin
            st = xorshift(st);
            check("dx", int'(dx), int'($signed(st[OW-1:0])));
            check("dy", int'(dy), int'($signed(st[16 +: OW])));
            if (dx < 0) neg_seen++; else pos_seen++;
          end
          nxt = 1;
          @(negedge clk); nxt = 0;
          // idle cycles must not move the generator
          @(negedge clk);
        end
      // after the last point next_i has no effect
      check("hold spray", int'(spray), NS - 1);
      check("hold point", int'(point), NP);
    end
    checks++;
    if (neg_seen == 0 || pos_seen == 0) begin failures++; $display("offsets one-sided"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
