// tb_imc_macro_core -- small crossbar (3 rows x 4 columns, 2 read cycles).
// Each row is written with several points per column as pulse staircases
// through the word-line decoder and switch matrix; the stored levels must
// be the running maxima, rows not selected must not change, and the parallel
// read must give, per column, TI times the sum of the device-equation
// conductances of that column's maxima.  A read with the bit lines idle
// must integrate nothing.
module tb_imc_macro_core;
  import rsr_pkg::*;
  import tb_ref_pkg::*;
  localparam int ROWS = 3, COLS = 4, TI = 2;
  localparam int CW = ch_width(ROWS, TI);
  logic clk = 0, set = 0, wl_en = 0, wl_all = 0, sclr = 0, sint = 0;
  logic [1:0] wl_row = 0;
  bl_mode_e mode = BL_IDLE;
  logic [COLS-1:0] ep = '0;
  logic [COLS-1:0][3:0] ea = '0;
  logic [COLS-1:0][CW-1:0] charge;
  lvl_t lvl [ROWS][COLS];
  int mx [ROWS][COLS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  imc_macro_core #(.ROWS(ROWS), .COLS(COLS), .TI(TI)) dut (
    .clk, .set_i(set), .wl_en_i(wl_en), .wl_all_i(wl_all), .wl_row_i(wl_row),
    .bl_mode_i(mode), .enc_pulse_i(ep), .enc_amp_i(ea),
    .sense_clear_i(sclr), .sense_integrate_i(sint), .charge_o(charge), .lvl_o(lvl));

  task automatic check(string what, int got, int expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, expv);
    end
  endtask

  task automatic write_point(int s, int q [COLS]);
    for (int j = 1; j <= 15; j++) begin
      @(negedge clk);
      wl_en = 1; wl_row = 2'(s); mode = BL_WRITE;
      for (int c = 0; c < COLS; c++) begin
        ep[c] = (j <= q[c]);
        ea[c] = (j <= q[c]) ? 4'(j) : 4'(0);
      end
    end
    @(negedge clk); wl_en = 0; mode = BL_IDLE; ep = '0; ea = '0;
  endtask

  task automatic read_all(bl_mode_e m);
    @(negedge clk); sclr = 1;
    @(negedge clk); sclr = 0;
    for (int t = 0; t < TI; t++) begin
      wl_en = 1; wl_all = 1; mode = m; sint = 1;
      @(negedge clk);
    end
    wl_en = 0; wl_all = 0; mode = BL_IDLE; sint = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int q [COLS];
    longint expc;
    for (int round = 0; round < 4; round++) begin
      @(negedge clk); set = 1;
      @(negedge clk); set = 0;
      for (int s = 0; s < ROWS; s++) for (int c = 0; c < COLS; c++) mx[s][c] = 0;
      for (int s = 0; s < ROWS; s++)
        for (int k = 0; k < 5; k++) begin
          for (int c = 0; c < COLS; c++) begin
            q[c] = $urandom_range(0, 15);
            if (q[c] > mx[s][c]) mx[s][c] = q[c];
          end
          write_point(s, q);
          for (int r = 0; r < ROWS; r++)
            for (int c = 0; c < COLS; c++) check("level", int'(lvl[r][c]), mx[r][c]);
        end
      read_all(BL_IDLE);
      for (int c = 0; c < COLS; c++) check("idle read", int'(charge[c]), 0);
      read_all(BL_READ);
      for (int c = 0; c < COLS; c++) begin
        expc = 0;
        for (int r = 0; r < ROWS; r++) expc += longint'(g_of_level(mx[r][c]));
        check("charge", int'(charge[c]), int'(expc * TI));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
