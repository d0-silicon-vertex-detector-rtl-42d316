// main_fsm_tb: runs the Main state machine through each of its branches and
// compares states, control bytes, mode lines and clock enables with the
// sequence expected from the state table, written out here independently.
//
// Commands are held for seven clocks, as the packet latch holds them.  The
// testbench checks the lengths the document's timing depends on: three
// acquisition set-up states, the eleven-state preamp reset loop, the 36-state
// pipeline readout with eight single clock pulses, digitization lasting until
// the counter's ripple carry, the ID bytes on the two clocks before the bus is
// released, and readout ending only after every HDI's priority-out.
module main_fsm_tb;
  import pc_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  ctrl_lines_t cmd = '0;
  logic rco_n = 1'b1;
  logic [3:0] pri_out = '0;
  logic dnld_en = 1'b0;
  logic [6:0] state;
  logic [7:0] d;
  logic mode0, mode1, ch_mode, bus_en, dav, pri_in, smclk, enacro, ena53, ena26;
  logic reading, prst_req, dnld_sel;
  int   checks = 0, failures = 0;
  int   cmd_hold = 0;

  main_fsm #(.N_HDI(4), .PCID0(8'hAA), .PCID1(8'hBB)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t (state %h)", what, $time, state); end
  endtask

  // Hold a decoded command for one packet time (7 clocks), from a falling edge.
  always @(negedge clk) begin
    if (cmd_hold > 0) begin
      cmd_hold--;
      if (cmd_hold === 0) cmd = '0;
    end
  end
  task automatic give(input ctrl_lines_t c);
    @(negedge clk);
    cmd = c;
    cmd_hold = 7;
  endtask
  function automatic ctrl_lines_t L(input string n);
    ctrl_lines_t c = '0;
    case (n)
      "idle": c.idle = 1; "acq": c.acq = 1; "dig": c.dig = 1; "readout": c.readout = 1;
      "rpre": c.reset_pre = 1; "dtp": c.dig_tp = 1; "pwr": c.pwr_up = 1;
      default: ;
    endcase
    return c;
  endfunction

  // Check the current state, then wait one clock.
  task automatic expect_state(input logic [6:0] s, input logic [7:0] dd, input logic [2:0] m);
    #1;
    chk(state === s, $sformatf("state %h exp %h", state, s));
    chk(d === dd, $sformatf("d %h exp %h", d, dd));
    chk({mode1, mode0, ch_mode} === m, $sformatf("mode %b exp %b", {mode1, mode0, ch_mode}, m));
    @(negedge clk);
  endtask

  int smclks, n;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    expect_state(7'h00, 8'h71, 3'b000);

    // Acquisition: three set-up states, then the run state.
    give(L("acq"));
    #1; chk(state === 7'h00, "acq seen at next edge");
    @(negedge clk);
    expect_state(7'h01, 8'h71, 3'b001);
    expect_state(7'h02, 8'h78, 3'b011);
    expect_state(7'h03, 8'h78, 3'b010);
    expect_state(7'h04, 8'h7C, 3'b010);
    #1; chk(enacro, "crossing clock enabled one clock after ACQ_RUN");
    repeat (10) expect_state(7'h04, 8'h7C, 3'b010);

    // Preamp reset loop: 11 states, then back.
    give(L("rpre"));
    @(negedge clk);
    n = 0;
    while (prst_req && n < 50) begin chk(d === 8'h7D && enacro, "preamp reset byte"); n++; @(negedge clk); end
    chk(n === 11, $sformatf("preamp reset loop %0d states", n));
    #1; chk(state === 7'h04, "back to ACQ_RUN");
    @(negedge clk);

    // Digitize: pipeline readout of 36 states with 8 single clocks.
    give(L("dig"));
    @(negedge clk);
    #1; chk(state === 7'h10, "pipeline readout entered");
    smclks = 0; n = 0;
    while (state inside {[7'h10:7'h33]} && n < 100) begin
      if (smclk) smclks++;
      chk(mode0 && !mode1, "pipeline readout mode");
      n++; @(negedge clk); #1;
    end
    chk(n === 36, $sformatf("pipeline readout %0d states", n));
    chk(smclks === 8, $sformatf("%0d single clocks", smclks));
    chk(!enacro, "pipeline clock halted");
    // Digitization set-up 34..3A, counting in 3B.
    expect_state(7'h34, 8'h30, 3'b011);
    expect_state(7'h35, 8'hB2, 3'b111);
    expect_state(7'h36, 8'hB2, 3'b110);
    #1; chk(ena53, "53 MHz enabled");
    expect_state(7'h37, 8'hB0, 3'b110);
    for (int i = 0; i < 3; i++) expect_state(7'h38 + 7'(i), 8'hA0, 3'b110);
    repeat (20) expect_state(7'h3B, 8'h80, 3'b110);
    rco_n = 1'b0;
    expect_state(7'h3B, 8'h80, 3'b110);
    rco_n = 1'b1;
    repeat (5) expect_state(7'h3C, 8'h03, 3'b110);
    #1; chk(!ena53, "53 MHz stopped after digitization");

    // Readout: ID bytes with DAV, then bus released until all priority-outs.
    give(L("readout"));
    @(negedge clk);
    expect_state(7'h3D, 8'h71, 3'b111);
    #1; chk(dav && bus_en, "DAV with first ID byte");
    expect_state(7'h3E, 8'hAA, 3'b111);
    #1; chk(dav && bus_en, "DAV with second ID byte");
    expect_state(7'h3F, 8'hBB, 3'b111);
    #1; chk(!bus_en && pri_in && reading, "bus released");
    @(negedge clk); #1; chk(ena26, "26 MHz readout clock");
    pri_out = 4'b0001; @(negedge clk); pri_out = 4'b0000;
    repeat (5) begin #1; chk(state === 7'h40, "waiting for all priority-outs"); @(negedge clk); end
    pri_out = 4'b0100; @(negedge clk); pri_out = 4'b1010; @(negedge clk); pri_out = 4'b0000;
    expect_state(7'h41, 8'h7F, 3'b101);
    expect_state(7'h42, 8'h00, 3'b001);
    expect_state(7'h00, 8'h71, 3'b000);

    // Idle -> readout directly.
    give(L("readout"));
    @(negedge clk);
    expect_state(7'h4B, 8'h03, 3'b001);
    expect_state(7'h3D, 8'h71, 3'b111);
    repeat (3) @(negedge clk);
    pri_out = 4'hF; @(negedge clk); pri_out = 4'h0;
    repeat (2) @(negedge clk);
    expect_state(7'h00, 8'h71, 3'b000);

    // Test pulse: two calibration-inject states, then the digitize sequence.
    repeat (3) @(negedge clk);
    give(L("dtp"));
    @(negedge clk);
    expect_state(7'h48, 8'hF6, 3'b000);
    expect_state(7'h49, 8'hF6, 3'b000);
    expect_state(7'h34, 8'h30, 3'b011);
    repeat (8) @(negedge clk);
    rco_n = 1'b0; @(negedge clk); rco_n = 1'b1;
    #1; chk(state === 7'h3C, "test pulse digitized");
    // Reset returns to idle.
    rst = 1'b1; @(negedge clk); rst = 1'b0;

    // Idle -> digitize directly.
    repeat (7) @(negedge clk);
    give(L("dig"));
    @(negedge clk);
    expect_state(7'h4A, 8'h30, 3'b001);
    expect_state(7'h34, 8'h30, 3'b011);
    wait (cmd_hold === 0);
    rst = 1'b1; @(negedge clk); rst = 1'b0;

    // Download: held while enabled.
    repeat (7) @(negedge clk);
    dnld_en = 1'b1; @(negedge clk);
    repeat (10) begin #1; chk(state === 7'h43 && dnld_sel && d === 8'h71, "download"); @(negedge clk); end
    dnld_en = 1'b0; @(negedge clk);
    expect_state(7'h44, 8'hF1, 3'b000);
    expect_state(7'h00, 8'h71, 3'b000);

    // Power-up: wait for an idle code.
    give(L("pwr"));
    @(negedge clk);
    repeat (12) expect_state(7'h45, 8'h00, 3'b000);
    give(L("idle"));
    @(negedge clk);
    expect_state(7'h46, 8'h00, 3'b001);
    expect_state(7'h47, 8'h71, 3'b001);
    expect_state(7'h00, 8'h71, 3'b000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
