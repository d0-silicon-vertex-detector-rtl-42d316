// preamp_pulse_tb: checks the preamp reset pulse width against the delay of
// a delay-line model, for several programmed delays, and the pass-through
// of bit 0 outside the reset loop.
module preamp_pulse_tb;
  logic prst_req = 0, d0 = 0, dly_ret, dly_drive, d0_out;
  int   dly_ns = 30;
  realtime t_rise, t_fall;
  int   checks = 0, failures = 0;

  preamp_pulse dut (.*);

  // Behavioural delay line: a 1 ns tapped line, tap chosen by dly_ns.
  logic [255:0] line = '0;
  always #1 line <= {line[254:0], dly_drive};
  assign dly_ret = line[dly_ns - 1];

  always @(posedge d0_out) t_rise = $realtime;
  always @(negedge d0_out) t_fall = $realtime;

  initial begin
    #100;
    for (int k = 0; k < 4; k++) begin
      dly_ns = (k === 0) ? 10 : (k === 1) ? 25 : (k === 2) ? 60 : 120;
      d0 = 1'b0; prst_req = 1'b1;
      #1; checks++;
      if (!d0_out) begin failures++; $display("FAIL pulse did not start"); end
      #(207);   // 11 states of 18.8 ns
      prst_req = 1'b0;
      #(dly_ns + 10);
      checks++;
      if ((t_fall - t_rise) < real'(dly_ns - 1) || (t_fall - t_rise) > real'(dly_ns + 1)) begin
        failures++; $display("FAIL width %0t exp %0d", t_fall - t_rise, dly_ns);
      end
      #50;
    end
    // Pass-through outside the loop.
    for (int v = 0; v < 2; v++) begin
      d0 = v[0]; #1; checks++;
      if (d0_out !== d0 || dly_drive) begin failures++; $display("FAIL pass-through"); end
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
