// bl_switch_matrix -- bit-line switch matrix of the RRAM macro core.
//
// Connects every bit line either to nothing (idle), to its own pulse encoder
// (write: the scale-to-max programming pulses) or to the shared
// non-destructive read voltage (read: all columns at once).
//
// Interface: mode_i (bl_mode_e), enc_pulse_i/enc_amp_i per column ->
// bl_pulse_o/bl_amp_o/bl_read_o per column.  Combinational.
module bl_switch_matrix
  import rsr_pkg::*;
#(
  parameter int unsigned COLS = IMG_W,
  parameter int unsigned QB   = Q_BITS
) (
  input  bl_mode_e                mode_i,
  input  logic [COLS-1:0]         enc_pulse_i,
  input  logic [COLS-1:0][QB-1:0] enc_amp_i,
  output logic [COLS-1:0]         bl_pulse_o,
  output logic [COLS-1:0][QB-1:0] bl_amp_o,
  output logic [COLS-1:0]         bl_read_o
);
  always_comb begin
    bl_pulse_o = '0;
    bl_amp_o   = '0;
    bl_read_o  = '0;
    unique case (mode_i)
      BL_WRITE: begin
        bl_pulse_o = enc_pulse_i;
        bl_amp_o   = enc_amp_i;
      end
      BL_READ:  bl_read_o = '1;
      default:  ;
    endcase
  end
endmodule
