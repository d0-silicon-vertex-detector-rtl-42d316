// master_fsm_tb: scenario test of the Master state machine.
//
// Checks, cycle by cycle, the two-step error reports (set-up, then one CAV
// strobe) for a parity error and for loss of synch; that neither is sent
// during readout and that a loss of synch is reported once readout ends;
// the G-Link relock (relock reset high, ED low, for as long as the code is
// received) and its priority; and the latching of both diagnostic modes,
// their bus enables and their clearing by the reset code.  Counts CAV strobes.
module master_fsm_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic par_err_in = 0, reset_code = 0, lock_code = 0, diag0_code = 0, diag1_code = 0;
  logic sync = 1, bus_en = 1, reading = 0;
  logic bus_en0, bus_en1, cav, ed, notify, la, nosync, par_err, relock_rst;
  int   checks = 0, failures = 0, cavs = 0;

  master_fsm dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (cav) cavs++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Check the outputs in the current cycle: {notify, cav, par_err, nosync, relock_rst, ed}
  task automatic expect_out(input logic [5:0] e, input string what);
    #1;
    chk({notify, cav, par_err, nosync, relock_rst, ed} === e,
        $sformatf("%s: got %b exp %b", what, {notify, cav, par_err, nosync, relock_rst, ed}, e));
  endtask

  task automatic step;
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    expect_out(6'b000001, "idle");
    // Parity error report.
    par_err_in = 1; step; par_err_in = 0;
    expect_out(6'b101001, "pe setup");  step;
    expect_out(6'b111001, "pe strobe"); step;
    expect_out(6'b100001, "pe hold");   step;
    expect_out(6'b000001, "pe done");
    chk(cavs === 1, "one strobe per parity error");
    // Parity error during readout: ignored.
    reading = 1; par_err_in = 1; step; par_err_in = 0;
    repeat (4) begin expect_out(6'b000001, "pe ignored in readout"); step; end
    // Loss of synch during readout: waits for the end of readout.
    sync = 0;
    repeat (5) begin expect_out(6'b000001, "nosync held off"); step; end
    reading = 0; step;
    expect_out(6'b100101, "ns setup");  step;
    expect_out(6'b110101, "ns strobe"); step;
    repeat (10) begin expect_out(6'b000001, "ns wait"); step; end
    chk(cavs === 2, "one strobe per loss of synch");
    sync = 1; step; step;
    expect_out(6'b000001, "resynched");
    // G-Link loss of lock, together with a loss of synch: relock wins.
    lock_code = 1; sync = 0; step;
    repeat (20) begin expect_out(6'b000010, "relock"); step; end
    lock_code = 0; sync = 1; step;
    expect_out(6'b000001, "relock done");
    // Diagnostic modes.
    bus_en = 0; step;
    chk(!la && !bus_en0 && !bus_en1, "no diag");
    diag0_code = 1; step; diag0_code = 0; #1;
    chk(la && bus_en0 && !bus_en1, "diag0 latched");
    repeat (5) step;
    chk(la && bus_en0 && !bus_en1, "diag0 held");
    diag1_code = 1; step; diag1_code = 0; #1;
    chk(la && bus_en0 && bus_en1, "diag1 latched");
    reset_code = 1; step; reset_code = 0; #1;
    chk(!la && !bus_en0 && !bus_en1, "reset clears diag");
    bus_en = 1; #1;
    chk(bus_en0 && bus_en1, "bus enables follow main machine");
    $display("COUNT cav_strobes=%0d", cavs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
