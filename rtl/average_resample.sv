// average_resample -- averaging of the sensed charge and resampling of the
// target pixel (the digital back end of the retinex engine).
//
// For one target pixel it receives the integrated source-line charge, i.e.
// TI read cycles times the sum over the N spray maxima of their cell
// conductances.  Averaging divides by N*TI, giving the mean conductance,
// which is the reciprocal of the harmonic mean of the maxima's resistances.
// That mean is mapped back through the device curve to the nearest of the
// 16 levels (a tie goes to the lower level): the white reference w
// (level w stands for the intensity 17*w).
// Resampling then scales the original 8-bit target pixel:
//   out = min(255, pix * 15 / max(w, 1)),
// i.e. pix / (17*w) in 8-bit full scale, saturated.  Using the full-precision
// target for the final division follows the source design; the nearest-level
// inverse mapping, the w = 0 guard and the saturation are this
// implementation's choices.
//
// Interface: in_valid_i with charge_i and pix_i; two register stages later
// out_valid_o with out_pix_o and the white reference out_w_o.  Fully
// pipelined, one pixel per cycle, no back-pressure.
module average_resample
  import rsr_pkg::*;
#(
  parameter int unsigned ROWS = N_SPRAYS,
  parameter int unsigned TI   = T_INT,
  parameter int unsigned CW   = ch_width(N_SPRAYS, T_INT)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid_i,
  input  logic [CW-1:0] charge_i,
  input  pix_t          pix_i,
  output logic          out_valid_o,
  output pix_t          out_pix_o,
  output lvl_t          out_w_o
);
  localparam int unsigned DIV = ROWS * TI;

  // Twice the decision threshold halfway between neighbouring level
  // conductances (kept doubled so that the comparison is exact).
  function automatic logic [G_W:0] mid2(int unsigned l);
    return (G_W+1)'(G_TABLE[l]) + (G_W+1)'(G_TABLE[l+1]);
  endfunction

  logic [CW-1:0] avg;
  lvl_t          w_c;
  logic          v1;
  lvl_t          w1;
  pix_t          pix1;
  logic [PIX_W+Q_BITS-1:0] num, quo;
  lvl_t          den;

  always_comb begin
    avg = charge_i / CW'(DIV);
    w_c = '0;
    for (int unsigned l = 0; l < MAX_LVL; l++)
      if ({avg, 1'b0} < (CW+1)'(mid2(l))) w_c = w_c + 1'b1;
  end

  always_comb begin
    den = (w1 == '0) ? lvl_t'(1) : w1;
    num = (PIX_W+Q_BITS)'(pix1) * (PIX_W+Q_BITS)'(MAX_LVL);
    quo = num / (PIX_W+Q_BITS)'(den);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1          <= 1'b0;
      w1          <= '0;
      pix1        <= '0;
      out_valid_o <= 1'b0;
      out_pix_o   <= '0;
      out_w_o     <= '0;
    end else begin
      v1          <= in_valid_i;
      w1          <= w_c;
      pix1        <= pix_i;
      out_valid_o <= v1;
      out_w_o     <= w1;
      out_pix_o   <= (quo > (PIX_W+Q_BITS)'(255)) ? pix_t'(255) : pix_t'(quo);
    end
  end
endmodule
