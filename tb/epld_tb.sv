// epld_tb: drives the EPLD through a control-link model and checks its
// outputs: decoding into state changes, one SVX-II clock pulse per crossing
// in acquisition, ID bytes with DAV at readout, the error bytes with CAV for
// a parity error and a missing framing bit, the read-status line, and
// diagnostic mode 1 keeping the second HDI pair driven during readout.
module epld_tb;
  import pc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, nrz;
  logic rco_n = 1'b1;
  logic [3:0] pri_out = '0;
  logic dnld_en = 1'b0;
  logic [3:0] dnld_clk = '0;
  logic prst_dly_ret = 1'b0;
  logic [7:0] a;
  logic [1:0] pair_en;
  logic cav, dav, ed, mode0, mode1, ch_mode, pri_in, cnt_en, prst_dly_drive, sync, read_status;
  logic [3:0] svx_clk;
  logic [6:0] state;
  int   checks = 0, failures = 0, rises = 0, seen_rs = 0;
  logic [7:0] cav_q[$], dav_q[$];

  epld #(.N_HDI(4)) dut (.*);
  sar_link_model u_sar (.clk, .nrz);

  always #9.4 clk = ~clk;
  always @(posedge svx_clk[0]) rises++;
  always @(posedge clk) begin
    if (cav) cav_q.push_back(a);
    if (dav) dav_q.push_back(a);
    if (read_status) seen_rs++;
  end
  always @(posedge clk) prst_dly_ret <= prst_dly_drive;   // short delay line

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic wait_state(input logic [6:0] s, input string what);
    int n = 0;
    while (state !== s && n < 500) begin @(posedge clk); n++; end
    chk(state === s, what);
  endtask

  int r0, x0;
  initial begin
    u_sar.send_zeros(20);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (sync);
    u_sar.send(CODE_IDLE, 2); u_sar.drain();
    cav_q.delete();
    // Acquisition with crossings.
    u_sar.send(CODE_ACQ);
    wait_state(7'h04, "acquisition");
    repeat (10) @(posedge clk);
    r0 = rises; x0 = u_sar.crossings;
    u_sar.send(CODE_IDLE, 12); u_sar.drain();
    chk((rises - r0) - (u_sar.crossings - x0) inside {[-1:1]}, "one pulse per crossing");
    // Read status code.
    u_sar.send(CODE_READ_STATUS); u_sar.send(CODE_IDLE); u_sar.drain();
    repeat (14) @(posedge clk);
    chk(seen_rs === 7, "read status line for one packet");
    // Digitize, counter carry from the testbench.
    u_sar.send(CODE_DIG);
    wait_state(7'h3B, "counting");
    chk(cnt_en, "counter enabled");
    rco_n = 1'b0; @(posedge clk); #1 rco_n = 1'b1;
    wait_state(7'h3C, "digitized");
    // Diagnostic mode 1, then readout.
    u_sar.send(CODE_DIAG1); u_sar.send(CODE_READOUT);
    wait_state(7'h40, "readout");
    @(negedge clk);
    chk(pair_en === 2'b10 && a === 8'h40, "diag 1: pair 1 driven with the state");
    pri_out = 4'hF; @(posedge clk); #1 pri_out = '0;
    wait_state(7'h00, "readout done");
    chk(dav_q.size() >= 3 && dav_q[0] === 8'h3E && dav_q[1] === 8'h3F, "state replaces ID bytes in diagnostic mode");
    u_sar.send(CODE_RESET); u_sar.send(CODE_IDLE); u_sar.drain();
    chk(pair_en === 2'b11 && a === 8'h71, "diag cleared by reset");
    // Readout from idle: ID bytes.
    dav_q.delete();
    u_sar.send(CODE_READOUT);
    wait_state(7'h40, "readout 2");
    pri_out = 4'hF; @(posedge clk); #1 pri_out = '0;
    wait_state(7'h00, "readout 2 done");
    chk(dav_q[0] === 8'hAA && dav_q[1] === 8'hBB, "ID bytes");
    // Parity error and missing framing bit.
    u_sar.send_bad_parity(CODE_IDLE); u_sar.send(CODE_IDLE, 2); u_sar.drain();
    chk(cav_q.size() === 1 && cav_q[0] === 8'h02, "parity error byte");
    u_sar.send_no_frame(CODE_IDLE);
    wait (!sync);
    u_sar.q.delete(); u_sar.send_zeros(40);
    wait (sync);
    chk(cav_q.size() === 2 && cav_q[1] === 8'h01, "loss of synch byte");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
