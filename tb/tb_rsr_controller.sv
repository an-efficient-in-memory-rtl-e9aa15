// tb_rsr_controller -- the sequencer driving a real spray generator (2
// sprays of 3 points plus target, 4 columns, 3 image rows, 2 read cycles,
// 4-bit offsets).  A cycle monitor checks, for every image row: one clear,
// N*(n+1) fetch/load/pulse groups whose memory row is row+dy (or flagged
// out of image), 15 write cycles on the word line of the current spray,
// one integrator clear then TI all-row read cycles, the target-row read and
// capture, COLS issued columns in order, and the row length
//   1 + N*(n+1)*17 + 1 + TI + 2 + COLS cycles.
module tb_rsr_controller;
  import rsr_pkg::*;
  localparam int NS = 2, NP = 3, COLS = 4, H = 3, TI = 2, OW = 4;
  localparam int ROWLEN = 1 + NS * (NP + 1) * 17 + 1 + TI + 2 + COLS;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy;
  logic signed [OW-1:0] dx, dy, sdx;
  logic [0:0] spray, wl_row;
  logic [1:0] point, rrow, orow;
  logic [1:0] ocol;
  logic target, last, sg_start, sg_next, mem_re, sok, enc_load, set, wl_en, wl_all;
  logic sclr, sint, tcap, ov, olast;
  bl_mode_e mode;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spray_generator #(.NS(NS), .NP(NP), .OW(OW)) u_sg (
    .clk, .rst_n, .start_i(sg_start), .next_i(sg_next), .dx_o(dx), .dy_o(dy),
    .spray_o(spray), .point_o(point), .target_o(target), .last_o(last));

  rsr_controller #(.NS(NS), .COLS(COLS), .H(H), .TI(TI), .OW(OW)) dut (
    .clk, .rst_n, .start_i(start), .busy_o(busy),
    .sg_dx_i(dx), .sg_dy_i(dy), .sg_spray_i(spray), .sg_last_i(last),
    .sg_start_o(sg_start), .sg_next_o(sg_next),
    .mem_re_o(mem_re), .mem_rrow_o(rrow), .shift_dx_o(sdx), .shift_ok_o(sok),
    .enc_load_o(enc_load), .set_o(set), .wl_en_o(wl_en), .wl_all_o(wl_all), .wl_row_o(wl_row),
    .bl_mode_o(mode), .sense_clear_o(sclr), .sense_integrate_o(sint),
    .tgt_capture_o(tcap), .out_valid_o(ov), .out_row_o(orow), .out_col_o(ocol),
    .out_last_o(olast));

  task automatic check(string what, int got, int expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("%0t %s: got %0d expected %0d", $time, what, got, expv);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle monitor, sampled in the middle of each cycle
  int row = -1, row_t0 = 0, cyc = 0;
  int loads = 0, wcyc = 0, wrun = 0, reads = 0, clrs = 0, outs = 0, caps = 0, lasts = 0;
  int n_outside = 0, n_inside = 0;
  int exp_spray = 0, exp_point = 0;
  logic p_mem_re; logic [1:0] p_rrow; int p_dx, p_dy;

  task automatic close_row();
    check("row length", cyc - row_t0, ROWLEN);
    check("loads per row", loads, NS * (NP + 1));
    check("write cycles", wcyc, NS * (NP + 1) * 15);
    check("integrator clears", clrs, 1);
    check("read cycles", reads, TI);
    check("captures", caps, 1);
    check("issued columns", outs, COLS);
  endtask

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (set) begin
      if (row >= 0) close_row();
      row++; row_t0 = cyc;
      loads = 0; wcyc = 0; clrs = 0; reads = 0; caps = 0; outs = 0;
      exp_spray = 0; exp_point = 0;
      check("clear without write", int'(wl_en), 0);
    end
    if (enc_load) begin
      loads++;
      check("load after fetch", int'(p_mem_re), 1);
      check("shift dx", int'(sdx), p_dx);
      check("row ok", int'(sok), int'(row + p_dy >= 0 && row + p_dy < H));
      if (row + p_dy >= 0 && row + p_dy < H) begin
        n_inside++;
        check("fetched row", int'(p_rrow), row + p_dy);
      end else n_outside++;
      if (wrun != 0 && wrun != 15) check("write burst", wrun, 15);
      wrun = 0;
    end
    if (wl_en && !wl_all) begin
      wcyc++; wrun++;
      check("write mode", int'(mode), int'(BL_WRITE));
      check("write row", int'(wl_row), exp_spray);
      if (wrun == 15) begin
        if (exp_point == NP) begin exp_point = 0; exp_spray++; end else exp_point++;
      end
    end
    if (sclr) begin clrs++; check("clear before read", reads, 0); end
    if (sint) begin
      reads++;
      check("read all rows", int'(wl_en && wl_all), 1);
      check("read mode", int'(mode), int'(BL_READ));
    end
    if (tcap) begin
      caps++;
      check("target row read", int'(p_mem_re && p_rrow == 2'(row)), 1);
    end
    if (ov) begin
      check("out row", int'(orow), row);
      check("out col", int'(ocol), outs);
      check("output after capture", caps, 1);
      outs++;
    end
    if (olast) begin
      lasts++;
      check("last at final column", int'(row == H - 1 && outs == COLS), 1);
    end
    p_mem_re = mem_re; p_rrow = rrow; p_dx = int'(dx); p_dy = int'(dy);
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle", int'(busy), 0);
    start = 1;
    @(negedge clk); start = 0;
    check("busy", int'(busy), 1);
    wait (!busy);
    @(negedge clk);
    #1;
    close_row();     // the first idle cycle stands where the next clear would be
    check("rows", row + 1, H);
    check("last flag", lasts, 1);
    checks++;
    if (n_outside == 0 || n_inside == 0) begin
      failures++;
      $display("fetch coverage: %0d n_inside, %0d n_outside", n_inside, n_outside);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
