// pixel_quantizer -- maps an 8-bit intensity onto the 16 states of a 4-bit
// memristor cell.
//
// The source design stores intensities as 4-bit states and shows that 4 bits
// keep acceptable image quality.  This block uses uniform round-to-nearest
// quantization, level = round(pix * 15 / 255) = floor((pix + 8) / 17), so
// that level L stands for the 8-bit value 17*L.  The rounding rule is this
// implementation's choice.
//
// Interface: pix_i (8 bits) -> lvl_o (4 bits).  Purely combinational.
module pixel_quantizer
  import rsr_pkg::*;
#(
  parameter int unsigned PW = PIX_W,
  parameter int unsigned QB = Q_BITS
) (
  input  logic [PW-1:0] pix_i,
  output logic [QB-1:0] lvl_o
);
  localparam int unsigned PMAX = (1 << PW) - 1;
  localparam int unsigned QMAX = (1 << QB) - 1;
  localparam int unsigned STEP = PMAX / QMAX;   // 17 for 8 -> 4 bits

  logic [PW:0] biased;
  always_comb begin
    biased = {1'b0, pix_i} + (PW+1)'(STEP / 2);
    lvl_o  = QB'(biased / (PW+1)'(STEP));
  end
endmodule
