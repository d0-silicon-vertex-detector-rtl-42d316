// code_decoder: four-bit control code to one-hot control lines.
//
// Purely combinational.  Each output line is high while the latched packet
// holds the corresponding code, i.e. for a full packet time.  The twelve codes
// and their values follow the document's table and decoder equations; the
// four unassigned values raise no line.
module code_decoder
  import pc_pkg::*;
(
  input  logic [3:0]  code,
  output ctrl_lines_t lines
);
  always_comb begin
    lines = '0;
    unique case (code)
      CODE_IDLE:        lines.idle        = 1'b1;
      CODE_ACQ:         lines.acq         = 1'b1;
      CODE_DIG:         lines.dig         = 1'b1;
      CODE_READOUT:     lines.readout     = 1'b1;
      CODE_RESET_PRE:   lines.reset_pre   = 1'b1;
      CODE_RESET:       lines.reset       = 1'b1;
      CODE_DIAG1:       lines.diag1       = 1'b1;
      CODE_DIAG0:       lines.diag0       = 1'b1;
      CODE_DIG_TP:      lines.dig_tp      = 1'b1;
      CODE_READ_STATUS: lines.read_status = 1'b1;
      CODE_PWR_UP:      lines.pwr_up      = 1'b1;
      CODE_GLINK_LOCK:  lines.glink_lock  = 1'b1;
      default:          lines             = '0;
    endcase
  end
endmodule
