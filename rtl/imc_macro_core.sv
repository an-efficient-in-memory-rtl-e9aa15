// imc_macro_core -- RRAM in-memory computing macro core (behavioural model:
// it holds the analog cell and integrator models).
//
// A ROWS x COLS crossbar of 1T1R cells.  Column c belongs to target pixel c
// of the image row being enhanced and row s holds the maximum of that
// target's augmented spray s.  Writing: the word-line decoder opens row s
// and every bit line receives its own pulse staircase, so the scale-to-max
// of all COLS targets happens in parallel.  Reading: all word lines open and
// every bit line is at the read voltage, so each source line sums the
// conductances of its N spray maxima (the multiply-and-add with a shared
// input) and a sense integrator per column turns that current into a charge
// code.  Since conductance is the reciprocal of resistance and resistance
// grows with the stored maximum, the sum is the accumulation that the
// harmonic mean of the retinex white reference needs.
// The crossbar and the integrators are behavioural models of analog parts;
// the decoder and switch matrix are logic.
//
// Interface: set_i clears every cell; wl_en_i/wl_all_i/wl_row_i drive the
// word-line decoder; bl_mode_i selects the bit-line drive; enc_pulse_i/
// enc_amp_i are the per-column pulse trains; sense_clear_i/
// sense_integrate_i control the integrators; charge_o is the per-column
// result, valid the cycle after the last integrate cycle.  lvl_o exposes the
// cell states for observation.
module imc_macro_core
  import rsr_pkg::*;
#(
  parameter int unsigned ROWS = N_SPRAYS,
  parameter int unsigned COLS = IMG_W,
  parameter int unsigned TI   = T_INT
) (
  input  logic                              clk,
  input  logic                              set_i,
  input  logic                              wl_en_i,
  input  logic                              wl_all_i,
  input  logic [clog2_min1(ROWS)-1:0]       wl_row_i,
  input  bl_mode_e                          bl_mode_i,
  input  logic [COLS-1:0]                   enc_pulse_i,
  input  logic [COLS-1:0][Q_BITS-1:0]       enc_amp_i,
  input  logic                              sense_clear_i,
  input  logic                              sense_integrate_i,
  output logic [COLS-1:0][ch_width(ROWS,TI)-1:0] charge_o,
  output lvl_t                              lvl_o [ROWS][COLS]
);
  localparam int unsigned SW = sl_width(ROWS);
  localparam int unsigned CW = ch_width(ROWS, TI);

  logic [ROWS-1:0]             wl;
  logic [COLS-1:0]             bl_pulse, bl_read;
  logic [COLS-1:0][Q_BITS-1:0] bl_amp;
  gcode_t                      i_cell [ROWS][COLS];
  logic [COLS-1:0][SW-1:0]     i_sl;

  wl_decoder #(.ROWS(ROWS)) u_wl (
    .en_i (wl_en_i), .all_i(wl_all_i), .row_i(wl_row_i), .wl_o(wl)
  );

  bl_switch_matrix #(.COLS(COLS)) u_bl (
    .mode_i     (bl_mode_i),
    .enc_pulse_i(enc_pulse_i), .enc_amp_i(enc_amp_i),
    .bl_pulse_o (bl_pulse),    .bl_amp_o (bl_amp), .bl_read_o(bl_read)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      rram_cell u_cell (
        .clk    (clk),
        .set_i  (set_i),
        .wl_i   (wl[r]),
        .pulse_i(bl_pulse[c]),
        .amp_i  (bl_amp[c]),
        .read_i (bl_read[c]),
        .i_sl_o (i_cell[r][c]),
        .lvl_o  (lvl_o[r][c])
      );
    end
  end

  // Kirchhoff sum of the cell currents on each source line.
  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      i_sl[c] = '0;
      for (int r = 0; r < ROWS; r++) i_sl[c] = i_sl[c] + SW'(i_cell[r][c]);
    end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_sense
    sense_integrator #(.IW(SW), .CW(CW)) u_si (
      .clk        (clk),
      .clear_i    (sense_clear_i),
      .integrate_i(sense_integrate_i),
      .i_sl_i     (i_sl[c]),
      .charge_o   (charge_o[c])
    );
  end
endmodule
