// rsr_imc_top -- random spray retinex (RSR) image enhancer built around an
// RRAM in-memory computing macro core.
//
// RSR sets every output pixel to out = in / w, where the white reference w
// is the harmonic mean of the maxima of N random "sprays" of n neighbours
// (each spray augmented with the target itself).  Here the maxima and their
// accumulation are computed inside a crossbar of 4-bit 1T1R cells:
//   * the image sits in a row-organised frame store (image_mem);
//   * a spray generator produces the random offsets; all targets of an image
//     row share them, so one fetched row shifted by dx (mask_shifter) gives
//     every target its own spray point;
//   * each point is quantized to 4 bits and sent as a pulse staircase down
//     the target's column; the cell of the current spray's row keeps the
//     largest level it has seen (scale-to-max in memory);
//   * a parallel read sums the conductances of each column's N maxima on its
//     source line, a sense integrator digitises the sum, and the back end
//     averages it, maps it back to a white reference level and rescales the
//     original 8-bit pixel (average_resample).
// The dataflow follows the source design; the row-at-a-time schedule, the
// frame store, the shared spray offsets per row and every width not listed
// in rsr_pkg are this implementation's choices.  The crossbar cells and the
// sense integrators are behavioural models of analog parts.
//
// Interface: load the image through img_we_i/img_wrow_i/img_wcol_i/
// img_wdata_i while idle, pulse start_i, then collect W*H pixels from
// out_valid_o/out_row_o/out_col_o/out_pix_o (with the white reference level
// out_w_o), in raster order; done_o pulses with the last pixel.  Each row
// takes 1 + N*(n+1)*17 + TI + 4 + W cycles (see rsr_controller) and its
// pixels leave two cycles after they are issued.
module rsr_imc_top
  import rsr_pkg::*;
#(
  parameter int unsigned W    = IMG_W,
  parameter int unsigned H    = IMG_H,
  parameter int unsigned NS   = N_SPRAYS,
  parameter int unsigned NP   = N_POINTS,
  parameter int unsigned TI   = T_INT,
  parameter int unsigned OW   = OFF_W,
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     img_we_i,
  input  logic [clog2_min1(H)-1:0] img_wrow_i,
  input  logic [clog2_min1(W)-1:0] img_wcol_i,
  input  pix_t                     img_wdata_i,
  input  logic                     start_i,
  output logic                     busy_o,
  output logic                     done_o,
  output logic                     out_valid_o,
  output logic [clog2_min1(H)-1:0] out_row_o,
  output logic [clog2_min1(W)-1:0] out_col_o,
  output pix_t                     out_pix_o,
  output lvl_t                     out_w_o
);
  localparam int unsigned RW  = clog2_min1(H);
  localparam int unsigned CCW = clog2_min1(W);
  localparam int unsigned CW  = ch_width(NS, TI);

  // spray generator
  logic signed [OW-1:0]           sg_dx, sg_dy;
  logic [clog2_min1(NS)-1:0]      sg_spray;
  logic [clog2_min1(NP+1)-1:0]    sg_point;
  logic                           sg_target, sg_last, sg_start, sg_next;
  // memory and spray masks
  logic                           mem_re;
  logic [RW-1:0]                  mem_rrow;
  logic [W-1:0][PIX_W-1:0]        mem_row, mask_row, tgt_row;
  logic signed [OW-1:0]           shift_dx;
  logic                           shift_ok;
  // encoders and macro core
  logic                           enc_load, set_cells;
  logic [W-1:0][Q_BITS-1:0]       q_row, enc_amp;
  logic [W-1:0]                   enc_pulse, enc_busy;
  logic                           wl_en, wl_all;
  logic [clog2_min1(NS)-1:0]      wl_row;
  bl_mode_e                       bl_mode;
  logic                           sense_clear, sense_integrate;
  logic [W-1:0][CW-1:0]           charge;
  lvl_t                           cell_lvl [NS][W];
  // back end
  logic                           tgt_capture, issue_valid, issue_last;
  logic [RW-1:0]                  issue_row;
  logic [CCW-1:0]                 issue_col;
  logic [1:0]                     last_d;
  logic [1:0][RW-1:0]             row_d;
  logic [1:0][CCW-1:0]            col_d;

  rsr_controller #(.NS(NS), .COLS(W), .H(H), .TI(TI), .OW(OW)) u_ctrl (
    .clk, .rst_n, .start_i, .busy_o,
    .sg_dx_i(sg_dx), .sg_dy_i(sg_dy), .sg_spray_i(sg_spray), .sg_last_i(sg_last),
    .sg_start_o(sg_start), .sg_next_o(sg_next),
    .mem_re_o(mem_re), .mem_rrow_o(mem_rrow), .shift_dx_o(shift_dx), .shift_ok_o(shift_ok),
    .enc_load_o(enc_load), .set_o(set_cells),
    .wl_en_o(wl_en), .wl_all_o(wl_all), .wl_row_o(wl_row), .bl_mode_o(bl_mode),
    .sense_clear_o(sense_clear), .sense_integrate_o(sense_integrate),
    .tgt_capture_o(tgt_capture), .out_valid_o(issue_valid),
    .out_row_o(issue_row), .out_col_o(issue_col), .out_last_o(issue_last)
  );

  spray_generator #(.NS(NS), .NP(NP), .OW(OW), .SEED(SEED)) u_spray (
    .clk, .rst_n, .start_i(sg_start), .next_i(sg_next),
    .dx_o(sg_dx), .dy_o(sg_dy), .spray_o(sg_spray), .point_o(sg_point),
    .target_o(sg_target), .last_o(sg_last)
  );

  image_mem #(.W(W), .H(H)) u_mem (
    .clk, .we_i(img_we_i), .wrow_i(img_wrow_i), .wcol_i(img_wcol_i), .wdata_i(img_wdata_i),
    .re_i(mem_re), .rrow_i(mem_rrow), .rdata_o(mem_row)
  );

  mask_shifter #(.W(W), .OW(OW)) u_shift (
    .row_i(mem_row), .row_ok_i(shift_ok), .dx_i(shift_dx), .row_o(mask_row)
  );

  for (genvar c = 0; c < W; c++) begin : g_col
    pixel_quantizer u_q (.pix_i(mask_row[c]), .lvl_o(q_row[c]));
    pulse_encoder u_enc (
      .clk, .rst_n, .load_i(enc_load), .lvl_i(q_row[c]),
      .pulse_o(enc_pulse[c]), .amp_o(enc_amp[c]), .busy_o(enc_busy[c])
    );
  end

  imc_macro_core #(.ROWS(NS), .COLS(W), .TI(TI)) u_core (
    .clk, .set_i(set_cells),
    .wl_en_i(wl_en), .wl_all_i(wl_all), .wl_row_i(wl_row), .bl_mode_i(bl_mode),
    .enc_pulse_i(enc_pulse), .enc_amp_i(enc_amp),
    .sense_clear_i(sense_clear), .sense_integrate_i(sense_integrate),
    .charge_o(charge), .lvl_o(cell_lvl)
  );

  always_ff @(posedge clk) if (tgt_capture) tgt_row <= mem_row;

  average_resample #(.ROWS(NS), .TI(TI), .CW(CW)) u_back (
    .clk, .rst_n, .in_valid_i(issue_valid), .charge_i(charge[issue_col]),
    .pix_i(tgt_row[issue_col]),
    .out_valid_o(out_valid_o), .out_pix_o(out_pix_o), .out_w_o(out_w_o)
  );

  // Row/column tags travel alongside the two back-end pipeline stages.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_d <= '0;
      row_d  <= '0;
      col_d  <= '0;
    end else begin
      last_d <= {last_d[0], issue_last};
      row_d  <= {row_d[0], issue_row};
      col_d  <= {col_d[0], issue_col};
    end
  end

  assign out_row_o = row_d[1];
  assign out_col_o = col_d[1];
  assign done_o    = last_d[1];

`ifndef SYNTHESIS
  // The pulse encoders must have finished a train before the controller
  // leaves the write phase, so no stale pulse reaches the next batch.
  a_enc_idle_on_load: assert property (@(posedge clk) disable iff (!rst_n)
    enc_load |-> enc_busy == '0);
  // Point 0 of every spray is the target itself, with no offset.
  a_target_point: assert property (@(posedge clk) disable iff (!rst_n)
    sg_target |-> (sg_point == '0 && sg_dx == '0 && sg_dy == '0));
`endif
endmodule
