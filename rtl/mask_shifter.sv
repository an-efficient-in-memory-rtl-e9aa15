// mask_shifter -- forms one spray "mask" for a whole image row at once.
//
// All targets of an image row share the same spray offset (dx, dy): the row
// fetched at y = target_row + dy is shifted by dx so that column c receives
// the pixel at (c + dx, y).  This is how the source design generates its
// sprays, by shifting the image.  A point that falls outside the image reads
// as zero, which never changes a spray maximum; this amounts to dropping the
// point and is this implementation's choice of border handling.
//
// Interface: row_i (W pixels), row_ok_i (fetched row lies inside the image),
// dx_i (signed offset) -> row_o (W pixels).  Purely combinational; the
// shift is a barrel shifter on the packed row.
module mask_shifter
  import rsr_pkg::*;
#(
  parameter int unsigned W  = IMG_W,
  parameter int unsigned PW = PIX_W,
  parameter int unsigned OW = OFF_W
) (
  input  logic [W-1:0][PW-1:0] row_i,
  input  logic                 row_ok_i,
  input  logic signed [OW-1:0] dx_i,
  output logic [W-1:0][PW-1:0] row_o
);
  logic [OW-1:0] mag;
  always_comb begin
    mag = dx_i[OW-1] ? OW'(-dx_i) : OW'(dx_i);
    if (!row_ok_i)
      row_o = '0;
    else if (dx_i[OW-1])
      row_o = row_i << (mag * PW);   // column c takes column c - |dx|
    else
      row_o = row_i >> (mag * PW);   // column c takes column c + dx
  end
endmodule
