// rsr_controller -- sequencer of the retinex in-memory computing engine.
//
// The image is enhanced one row at a time; the COLS targets of a row are
// processed in parallel, one crossbar column each.  For every row:
//   CLEAR   one cycle: all cells back to the lowest state, spray generator
//           restarted at spray 0, point 0.
//   FETCH   read image row (row + dy) of the current spray point; remember
//           dx and whether that row lies inside the image.
//   LOAD    the shifted, quantized row is loaded into the pulse encoders.
//   PULSE   MAXL cycles of programming pulses into word line = spray index.
//           FETCH/LOAD/PULSE repeat for the N*(n+1) points of the row; a
//           point's pulses finish before the next batch is applied, as the
//           source design requires.
//   RCLR    clear the sense integrators.
//   INTEG   TI cycles of parallel read: all word lines, read voltage on all
//           bit lines.
//   TGT/TGT2 read the target row itself and capture it.
//   OUT     COLS cycles, one column per cycle to the averaging/resampling
//           back end.
// After the last row the controller returns to IDLE.  The per-row schedule
// (CLEAR, the un-overlapped FETCH and LOAD cycles, re-reading the target
// row) is this implementation's choice; a row takes
//   1 + N*(n+1)*(MAXL+2) + 1 + TI + 2 + COLS  cycles.
//
// Interface: start_i (in IDLE) begins a whole image; busy_o is high until
// the last column has been issued.  The remaining ports drive the spray
// generator, image memory, pulse encoders, macro core and back end as named.
module rsr_controller
  import rsr_pkg::*;
#(
  parameter int unsigned NS   = N_SPRAYS,
  parameter int unsigned COLS = IMG_W,
  parameter int unsigned H    = IMG_H,
  parameter int unsigned TI   = T_INT,
  parameter int unsigned OW   = OFF_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start_i,
  output logic                        busy_o,
  // spray generator
  input  logic signed [OW-1:0]        sg_dx_i,
  input  logic signed [OW-1:0]        sg_dy_i,
  input  logic [clog2_min1(NS)-1:0]   sg_spray_i,
  input  logic                        sg_last_i,
  output logic                        sg_start_o,
  output logic                        sg_next_o,
  // image memory and mask shifter
  output logic                        mem_re_o,
  output logic [clog2_min1(H)-1:0]    mem_rrow_o,
  output logic signed [OW-1:0]        shift_dx_o,
  output logic                        shift_ok_o,
  // pulse encoders and macro core
  output logic                        enc_load_o,
  output logic                        set_o,
  output logic                        wl_en_o,
  output logic                        wl_all_o,
  output logic [clog2_min1(NS)-1:0]   wl_row_o,
  output bl_mode_e                    bl_mode_o,
  output logic                        sense_clear_o,
  output logic                        sense_integrate_o,
  // back end
  output logic                        tgt_capture_o,
  output logic                        out_valid_o,
  output logic [clog2_min1(H)-1:0]    out_row_o,
  output logic [clog2_min1(COLS)-1:0] out_col_o,
  output logic                        out_last_o
);
  typedef enum logic [3:0] {
    S_IDLE, S_CLEAR, S_FETCH, S_LOAD, S_PULSE, S_RCLR, S_INTEG, S_TGT, S_TGT2, S_OUT
  } state_e;

  localparam int unsigned RW = clog2_min1(H);
  localparam int unsigned CCW = clog2_min1(COLS);
  localparam int unsigned TW = clog2_min1(MAX_LVL + TI + 1);

  state_e           state;
  logic [RW-1:0]    row;
  logic [CCW-1:0]   col;
  logic [TW-1:0]    cnt;
  logic signed [RW+1:0] src_row;

  always_comb src_row = $signed({2'b00, row}) + (RW+2)'(sg_dy_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      row        <= '0;
      col        <= '0;
      cnt        <= '0;
      shift_dx_o <= '0;
      shift_ok_o <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:  if (start_i) begin
                   row   <= '0;
                   state <= S_CLEAR;
                 end
        S_CLEAR: state <= S_FETCH;
        S_FETCH: begin
                   shift_dx_o <= sg_dx_i;
                   shift_ok_o <= (src_row >= 0) && (src_row < (RW+2)'(H));
                   state      <= S_LOAD;
                 end
        S_LOAD:  begin
                   cnt   <= '0;
                   state <= S_PULSE;
                 end
        S_PULSE: if (cnt == TW'(MAX_LVL - 1))
                   state <= sg_last_i ? S_RCLR : S_FETCH;
                 else
                   cnt <= cnt + 1'b1;
        S_RCLR:  begin
                   cnt   <= '0;
                   state <= S_INTEG;
                 end
        S_INTEG: if (cnt == TW'(TI - 1)) state <= S_TGT;
                 else                    cnt   <= cnt + 1'b1;
        S_TGT:   state <= S_TGT2;
        S_TGT2:  begin
                   col   <= '0;
                   state <= S_OUT;
                 end
        S_OUT:   if (col == CCW'(COLS - 1)) begin
                   if (row == RW'(H - 1)) state <= S_IDLE;
                   else begin
                     row   <= row + 1'b1;
                     state <= S_CLEAR;
                   end
                 end else col <= col + 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy_o            = (state != S_IDLE);
    sg_start_o        = (state == S_CLEAR);
    sg_next_o         = (state == S_PULSE) && (cnt == TW'(MAX_LVL - 1)) && !sg_last_i;
    mem_re_o          = (state == S_FETCH) || (state == S_TGT);
    mem_rrow_o        = (state == S_FETCH) ? RW'(src_row) : row;
    enc_load_o        = (state == S_LOAD);
    set_o             = (state == S_CLEAR);
    wl_en_o           = (state == S_PULSE) || (state == S_INTEG);
    wl_all_o          = (state == S_INTEG);
    wl_row_o          = sg_spray_i;
    bl_mode_o         = (state == S_PULSE) ? BL_WRITE :
                        (state == S_INTEG) ? BL_READ  : BL_IDLE;
    sense_clear_o     = (state == S_RCLR);
    sense_integrate_o = (state == S_INTEG);
    tgt_capture_o     = (state == S_TGT2);
    out_valid_o       = (state == S_OUT);
    out_row_o         = row;
    out_col_o         = col;
    out_last_o        = (state == S_OUT) && (col == CCW'(COLS - 1)) && (row == RW'(H - 1));
  end
endmodule
