// sense_integrator -- behavioural model of a source-line sense integrator
// with its converter.  This is a behavioural model of an analog circuit.
//
// During the parallel read, the source line of a column carries the sum of
// the currents of all its cells, i.e. the sum over the N sprays of the
// conductances of the spray maxima.  The integrator accumulates that
// current once per clock while integrate_i is high and presents the
// collected charge as a digital code, saturating at the converter's full
// scale.  An ideal converter (no offset or noise) is this model's choice.
//
// Interface: clear_i empties the integrator, integrate_i adds i_sl_i on each
// rising edge, charge_o is the registered result.
module sense_integrator
  import rsr_pkg::*;
#(
  parameter int unsigned IW = sl_width(N_SPRAYS),        // source-line current code width
  parameter int unsigned CW = ch_width(N_SPRAYS, T_INT)  // converter output width
) (
  input  logic          clk,
  input  logic          clear_i,
  input  logic          integrate_i,
  input  logic [IW-1:0] i_sl_i,
  output logic [CW-1:0] charge_o
);
  localparam int unsigned SW = ((IW > CW) ? IW : CW) + 1;
  localparam logic [SW-1:0] FULL = SW'({CW{1'b1}});

  logic [SW-1:0] sum;

  always_comb sum = SW'(charge_o) + SW'(i_sl_i);

  always_ff @(posedge clk) begin
    if (clear_i)          charge_o <= '0;
    else if (integrate_i) charge_o <= (sum > FULL) ? '1 : sum[CW-1:0];
  end
endmodule
