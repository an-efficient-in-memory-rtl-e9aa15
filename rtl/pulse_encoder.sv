// pulse_encoder -- pixel voltage generator for one bit line.
//
// Encodes a 4-bit level q as a train of programming pulses: over the 15
// pulse slots after a load, slot j (j = 1..15) carries a pulse of amplitude
// step j if j <= q and no pulse otherwise.  The train thus has q pulses,
// i.e. the level is coded by pulse number as in the source design, and its
// amplitudes climb one step per pulse like the 0.25 V staircase used to
// program the cells.  A cell already at state s >= j is not moved by step
// j, so after the train it holds max(s, q): the scale-to-max operation.
// Running every encoder for all 15 slots keeps all columns in lock step.
//
// Interface: load_i with lvl_i starts a train (cycle 0); pulse_o/amp_o are
// registered and valid in cycles 1..MAXL after the load; busy_o is high
// while slots remain.  A load while busy restarts the train.
module pulse_encoder
  import rsr_pkg::*;
#(
  parameter int unsigned QB = Q_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load_i,
  input  logic [QB-1:0] lvl_i,
  output logic          pulse_o,
  output logic [QB-1:0] amp_o,
  output logic          busy_o
);
  localparam logic [QB-1:0] MAXL = '1;

  logic [QB-1:0] q_r;
  logic [QB-1:0] step_r;   // 0 = idle, else current slot number

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_r    <= '0;
      step_r <= '0;
    end else if (load_i) begin
      q_r    <= lvl_i;
      step_r <= QB'(1);
    end else if (step_r != '0) begin
      step_r <= (step_r == MAXL) ? '0 : step_r + 1'b1;
    end
  end

  always_comb begin
    busy_o  = (step_r != '0);
    pulse_o = busy_o && (step_r <= q_r);
    amp_o   = pulse_o ? step_r : '0;
  end
endmodule
