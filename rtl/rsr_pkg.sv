// rsr_pkg -- types and constants shared by the random spray retinex (RSR)
// in-memory-computing engine.
//
// The engine enhances a grey-level image with RSR: for every target pixel it
// draws N sprays of n random neighbours, takes the maximum of each spray
// together with the target (the augmented spray), forms the harmonic mean of
// those maxima as the local white reference and divides the target by it.
// Spray maxima are kept as 4-bit resistance states of 1T1R RRAM cells and
// their reciprocal (conductance) is summed by the source-line currents.
//
// Numbers that follow the source design: 256x256 image, 8-bit input pixels,
// 4-bit (16-level) cell states, N = 25 sprays, n = 250 points per spray,
// Rmax = 2800 ohm, Rmin = 157 ohm, 21 programming pulse steps of 0.25 V and a
// nonlinearity of 1.5 per volt.  Everything else (bus widths, conductance
// units, mapping of levels to pulse steps) is this implementation's choice.
package rsr_pkg;

  localparam int unsigned PIX_W    = 8;    // input/output pixel width
  localparam int unsigned Q_BITS   = 4;    // cell state width (16 levels)
  localparam int unsigned LEVELS   = 1 << Q_BITS;
  localparam int unsigned MAX_LVL  = LEVELS - 1;
  localparam int unsigned IMG_W    = 256;
  localparam int unsigned IMG_H    = 256;
  localparam int unsigned N_SPRAYS = 25;   // N
  localparam int unsigned N_POINTS = 250;  // n
  localparam int unsigned OFF_W    = 9;    // signed spray offset width
  localparam int unsigned G_W      = 16;   // conductance code width
  localparam int unsigned T_INT    = 4;    // read integration window, cycles

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [Q_BITS-1:0] lvl_t;
  typedef logic [G_W-1:0]    gcode_t;
  typedef logic signed [OFF_W-1:0] off_t;

  // Bit-line drive selected by the BL switch matrix.
  typedef enum logic [1:0] {
    BL_IDLE  = 2'd0,  // bit lines grounded
    BL_WRITE = 2'd1,  // bit lines follow their pulse encoders
    BL_READ  = 2'd2   // all bit lines at the non-destructive read voltage
  } bl_mode_e;

  // Conductance of a cell at each 4-bit level, in units of 0.1 uS.
  // Level L is reached with p = round(21*L/15) gradual-RESET pulses, and
  //   R(p) = Rmax - F*(1 - exp(a*(p - 21))),  F = (Rmax - Rmin)/(1 - exp(-21*a))
  // with a = 1.5/V * 0.25 V per pulse step; G_TABLE[L] = round(1e7 / R(p)).
  localparam gcode_t G_TABLE [LEVELS] = '{
    16'd63694, 16'd63509, 16'd62857, 16'd62306,
    16'd60412, 16'd58869, 16'd56759, 16'd50319,
    16'd45835, 16'd34767, 16'd28775, 16'd23006,
    16'd13406, 16'd9858,  16'd5068,  16'd3571
  };

  function automatic int unsigned clog2_min1(int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

  // Width of a source-line current code: ROWS conductance codes summed.
  function automatic int unsigned sl_width(int unsigned rows);
    return G_W + clog2_min1(rows + 1);
  endfunction

  // Width of an integrated charge code: T_INT source-line codes summed.
  function automatic int unsigned ch_width(int unsigned rows, int unsigned t_int);
    return sl_width(rows) + clog2_min1(t_int + 1);
  endfunction

endpackage
