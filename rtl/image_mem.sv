// image_mem -- frame store for the input image.
//
// Holds H rows of W 8-bit pixels, one image row per memory word, so that a
// single access delivers a whole row to the mask shifter.  Pixels are written
// one at a time (byte write into the row word); rows are read with one cycle
// of latency.  Organisation and port widths are this implementation's
// choices: the source design only says that the image is read from storage
// through line buffers.
//
// Interface: we_i/wrow_i/wcol_i/wdata_i write one pixel; re_i/rrow_i read a
// row, rdata_o is valid the cycle after re_i and holds until the next read.
module image_mem
  import rsr_pkg::*;
#(
  parameter int unsigned W  = IMG_W,
  parameter int unsigned H  = IMG_H,
  parameter int unsigned PW = PIX_W
) (
  input  logic                        clk,
  input  logic                        we_i,
  input  logic [clog2_min1(H)-1:0]    wrow_i,
  input  logic [clog2_min1(W)-1:0]    wcol_i,
  input  logic [PW-1:0]               wdata_i,
  input  logic                        re_i,
  input  logic [clog2_min1(H)-1:0]    rrow_i,
  output logic [W-1:0][PW-1:0]        rdata_o
);
  logic [W-1:0][PW-1:0] mem [H];

  always_ff @(posedge clk) begin
    if (we_i) mem[wrow_i][wcol_i] <= wdata_i;
    if (re_i) rdata_o <= mem[rrow_i];
  end
endmodule
