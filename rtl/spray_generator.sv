// spray_generator -- random pixel generation for the augmented sprays.
//
// Walks through N sprays of n+1 points each.  Point 0 of every spray is the
// target itself (offset 0,0), which makes the spray "augmented"; points
// 1..n are pseudo-random offsets drawn with equal probability from the
// square [-2^(OW-1), 2^(OW-1)-1]^2 (the flat sampling profile), which covers
// the whole image for the default 9-bit offsets.  The random source is a
// 32-bit xorshift generator (shifts 13, 17, 5) advanced once per random
// point; dx is bits [OW-1:0] and dy bits [16+OW-1:16] of its state.  The
// generator type, the profile and the offset range are this
// implementation's choices.
//
// Interface: start_i restarts at spray 0 point 0 (the random state is not
// reseeded, so every image row gets fresh sprays); next_i advances one
// point.  dx_o/dy_o/spray_o/point_o/target_o describe the current point and
// last_o flags the final point of the final spray.  Outputs are registered
// and change the cycle after start_i or next_i.
module spray_generator
  import rsr_pkg::*;
#(
  parameter int unsigned NS   = N_SPRAYS,
  parameter int unsigned NP   = N_POINTS,
  parameter int unsigned OW   = OFF_W,
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start_i,
  input  logic                          next_i,
  output logic signed [OW-1:0]          dx_o,
  output logic signed [OW-1:0]          dy_o,
  output logic [clog2_min1(NS)-1:0]     spray_o,
  output logic [clog2_min1(NP+1)-1:0]   point_o,
  output logic                          target_o,
  output logic                          last_o
);
  logic [31:0] state, s1, s2, s3;

  always_comb begin
    s1 = state ^ (state << 13);
    s2 = s1 ^ (s1 >> 17);
    s3 = s2 ^ (s2 << 5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= SEED;
      spray_o <= '0;
      point_o <= '0;
    end else if (start_i) begin
      spray_o <= '0;
      point_o <= '0;
    end else if (next_i && !last_o) begin
      if (point_o == (clog2_min1(NP+1))'(NP)) begin
        point_o <= '0;
        spray_o <= spray_o + 1'b1;
      end else begin
        point_o <= point_o + 1'b1;
        state   <= s3;                 // fresh random offset for the next point
      end
    end
  end

  always_comb begin
    target_o = (point_o == '0);
    dx_o     = target_o ? '0 : state[OW-1:0];
    dy_o     = target_o ? '0 : state[16 +: OW];
    last_o   = (spray_o == (clog2_min1(NS))'(NS - 1)) &&
               (point_o == (clog2_min1(NP+1))'(NP));
  end
endmodule
