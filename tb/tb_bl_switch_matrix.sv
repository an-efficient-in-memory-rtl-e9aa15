// tb_bl_switch_matrix -- random encoder outputs in each bit-line mode:
// write passes the pulses, read raises every read switch, idle drives nothing.
module tb_bl_switch_matrix;
  import rsr_pkg::*;
  localparam int COLS = 256;
  bl_mode_e mode;
  logic [COLS-1:0] ep, bp, br;
  logic [COLS-1:0][3:0] ea, ba;
  int checks = 0, failures = 0;

  bl_switch_matrix dut (.mode_i(mode), .enc_pulse_i(ep), .enc_amp_i(ea),
                        .bl_pulse_o(bp), .bl_amp_o(ba), .bl_read_o(br));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 60; t++) begin
      for (int c = 0; c < COLS; c++) begin ep[c] = 1'($urandom); ea[c] = 4'($urandom); end
      mode = bl_mode_e'(t % 3);
      #1;
      checks++;
      case (mode)
        BL_WRITE: if (bp != ep || ba != ea || br != '0) failures++;
        BL_READ:  if (bp != '0 || ba != '0 || br != '1) failures++;
        default:  if (bp != '0 || ba != '0 || br != '0) failures++;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
