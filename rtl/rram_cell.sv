// rram_cell -- behavioural model of one 4-bit 1T1R memristor cell.
// This is a behavioural model of an analog device, not synthesizable logic.
//
// The cell holds one of 16 resistance states.  A programming pulse of
// amplitude step j moves a cell that sits below state j up to state j
// (gradual RESET: resistance grows with the pulse amplitude) and leaves a
// cell at state j or above untouched, so a staircase of pulses leaves the
// cell at the largest level it carried -- the in-memory scale-to-max.  The
// resistance of state L follows the fitted device model of the source
// design, with L reached after p = round(21*L/15) pulse steps:
//   R(p) = Rmax - F*(1 - exp(a*(p - 21))),  F = (Rmax - Rmin)/(1 - exp(-21*a))
//   Rmax = 2800 ohm, Rmin = 157 ohm, a = 1.5/V * 0.25 V per step.
// During a read the cell passes a current proportional to its conductance;
// the model reports it as a conductance code in units of 0.1 uS (the read
// voltage is a common factor of every column).  set_i returns the cell to
// its lowest state (a full SET); the name and timing of that operation are
// this model's choice.  Device variation and read noise are not modelled.
//
// Interface (all sampled on the rising clock edge): wl_i gates the access
// transistor, pulse_i/amp_i are the bit-line programming pulse, read_i is
// the read voltage on the bit line, set_i clears.  i_sl_o is the
// source-line contribution (0 unless wl_i and read_i), lvl_o the state.
module rram_cell
  import rsr_pkg::*;
#(
  parameter real R_MAX_OHM = 2800.0,
  parameter real R_MIN_OHM = 157.0,
  parameter int  P_MAX     = 21,
  parameter real ALPHA     = 0.375   // per pulse step: 1.5 /V * 0.25 V
) (
  input  logic   clk,
  input  logic   set_i,
  input  logic   wl_i,
  input  logic   pulse_i,
  input  lvl_t   amp_i,
  input  logic   read_i,
  output gcode_t i_sl_o,
  output lvl_t   lvl_o
);
  typedef gcode_t glut_t [LEVELS];

  lvl_t   lvl_r;
  gcode_t g_r;

  function automatic real resistance(int l);
    int  p;
    real f;
    p = (2 * P_MAX * l + int'(MAX_LVL)) / (2 * int'(MAX_LVL));
    f = (R_MAX_OHM - R_MIN_OHM) / (1.0 - $exp(-ALPHA * real'(P_MAX)));
    return R_MAX_OHM - f * (1.0 - $exp(ALPHA * real'(p - P_MAX)));
  endfunction

  // Conductance code of every level, evaluated once at elaboration.
  function automatic glut_t make_lut();
    glut_t t;
    for (int l = 0; l < int'(LEVELS); l++)
      t[l] = gcode_t'($rtoi(1.0e7 / resistance(l) + 0.5));
    return t;
  endfunction

  localparam glut_t G_LUT = make_lut();

  always_ff @(posedge clk) begin
    if (set_i) begin
      lvl_r <= '0;
      g_r   <= G_LUT[0];
    end else if (wl_i && pulse_i && amp_i > lvl_r) begin
      lvl_r <= amp_i;
      g_r   <= G_LUT[amp_i];
    end
  end

  assign i_sl_o = (wl_i && read_i) ? g_r : '0;
  assign lvl_o  = lvl_r;
endmodule
