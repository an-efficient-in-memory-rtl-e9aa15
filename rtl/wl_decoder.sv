// wl_decoder -- word-line decoder of the RRAM macro core.
//
// While writing, one word line (the row that holds the current spray of
// every target in the image row) is driven; during the parallel read all
// word lines are driven so every row adds its current to the source lines.
//
// Interface: en_i enables the decoder, all_i selects every row, row_i is the
// binary row address; wl_o is one-hot (or all ones, or zero).  Combinational.
// An address beyond ROWS-1 selects nothing.
module wl_decoder
  import rsr_pkg::*;
#(
  parameter int unsigned ROWS = N_SPRAYS
) (
  input  logic                        en_i,
  input  logic                        all_i,
  input  logic [clog2_min1(ROWS)-1:0] row_i,
  output logic [ROWS-1:0]             wl_o
);
  always_comb begin
    wl_o = '0;
    if (en_i) begin
      if (all_i) wl_o = '1;
      else
        for (int r = 0; r < ROWS; r++)
          wl_o[r] = (row_i == (clog2_min1(ROWS))'(r));
    end
  end
endmodule
