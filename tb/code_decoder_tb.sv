// code_decoder_tb: exhaustive check of the control-code decoder against the
// code table written out here as plain numbers.
module code_decoder_tb;
  import pc_pkg::*;
  logic [3:0]  code;
  ctrl_lines_t lines;
  int checks = 0, failures = 0;

  code_decoder dut (.code, .lines);

  function automatic ctrl_lines_t expected(input int c);
    ctrl_lines_t e = '0;
    case (c)
      0:  e.idle = 1;        1:  e.acq = 1;       3:  e.dig = 1;
      2:  e.readout = 1;     5:  e.reset_pre = 1; 6:  e.reset = 1;
      11: e.diag1 = 1;       9:  e.diag0 = 1;     7:  e.dig_tp = 1;
      4:  e.read_status = 1; 12: e.pwr_up = 1;    15: e.glink_lock = 1;
      default: ;
    endcase
    return e;
  endfunction

  initial begin
    for (int c = 0; c < 16; c++) begin
      code = 4'(c);
      #1;
      checks++;
      if (lines !== expected(c)) begin
        failures++;
        $display("FAIL code %b lines %b", code, lines);
      end
      checks++;
      if ($countones(lines) > 1) begin failures++; $display("FAIL not one-hot"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
