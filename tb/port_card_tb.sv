// port_card_tb: end-to-end test of a Port Card at its default size (two Port
// Card Equivalents, four HDIs each) through one complete data-taking cycle.
//
// Each PCE gets its own control-link model (same command stream on both),
// four SVX-II readout models and a preamp-reset delay-line model (40 ns).
// The readout board's reaction to a loss-of-synch report (a string of
// zeroes, then packets again) is modelled by watching the G-Link control
// words.  The test goes through: initial synchronisation, power-up, a VME
// download of 1820 bits into every HDI chain, acquisition at 132 ns and at
// 395 ns bunch spacing, preamp reset, digitization, readout, a parity error,
// a missing framing bit with resynchronisation, diagnostic mode during
// readout, G-Link loss of lock, the test-pulse sequence and the Port Card
// reset code.  Every mechanism is counted and must occur at least once.
module port_card_tb;
  import pc_pkg::*;
  localparam int NP = 2, NH = 4, DLY_NS = 40, NBIT = 1820;

  logic clk = 1'b0, vclk = 1'b0, rst = 1'b1;
  logic [NP-1:0] clk53, nrz, prst_dly_ret, prst_dly_drive, glink_dav, glink_cav, glink_ed;
  logic [NP-1:0] mode0, mode1, ch_mode, pri_in, sync, read_status;
  logic [NP-1:0][3:0][7:0] svx_bus, hdi_bus;
  logic [NP-1:0][3:0] pri_out, hdi_drv_en, hdi_sdata, svx_clk;
  logic [NP-1:0][7:0] count_preset;
  logic [NP-1:0][1:0][15:0] glink_d;
  logic [NP-1:0][6:0] state;
  logic vme_as_n = 1, vme_ds_n = 1, vme_write_n = 1, vme_dtack_n;
  logic [7:0] vme_addr = '0;
  logic [15:0] vme_data = '0;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_lock = 0, n_pwrup = 0, n_dnld = 0, n_acq = 0, n_acq395 = 0, n_prst = 0, n_pipe = 0;
  int n_dig = 0, n_read = 0, n_perr = 0, n_nosync = 0, n_resync = 0, n_diag = 0;
  int n_relock = 0, n_tp = 0, n_rstcode = 0;

  port_card dut (.*);

  always #9.4 clk = ~clk;      // 53 MHz link clock
  always #12.5 vclk = ~vclk;   // VME board clock
  assign clk53 = {NP{clk}};
  wire vme_clk = vclk;

  // ---- models ----------------------------------------------------------
  logic [NBIT-1:0] chain[NP][NH];
  int rises[NP][NH] = '{default: 0};   // rising SVX-II clock edges per HDI
  logic [NBIT-1:0] sent[NP*NH];
  for (genvar p = 0; p < NP; p++) begin : g_p
    sar_link_model u_sar (.clk, .nrz(nrz[p]));
    logic [255:0] line = '0;
    always #1 line <= {line[254:0], prst_dly_drive[p]};
    assign prst_dly_ret[p] = line[DLY_NS - 1];
    for (genvar h = 0; h < NH; h++) begin : g_h
      svx_hdi_model u_svx (.svx_clk(svx_clk[p][h]), .pri_in(pri_in[p]),
                           .bus(svx_bus[p][h]), .pri_out(pri_out[p][h]));
      initial begin
        u_svx.n_bytes = 6 + 3 * h;
        u_svx.seed    = 8'h20 + 8'(h * 16);
      end
      always @(posedge svx_clk[p][h]) rises[p][h]++;
      always @(posedge svx_clk[p][h]) if (state[p] === 7'h43) chain[p][h] <= {chain[p][h][NBIT-2:0], hdi_sdata[p][h]};
    end
    // The readout board answers a loss-of-synch report with zeroes.
    always @(posedge clk) if (glink_cav[p] && glink_d[p][0][0]) begin
      u_sar.q.delete();
      u_sar.send_zeros(40);
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(input logic [3:0] code, input int n = 1);
    g_p[0].u_sar.send(code, n);
    g_p[1].u_sar.send(code, n);
  endtask
  task automatic drain();
    g_p[0].u_sar.drain();
    g_p[1].u_sar.drain();
  endtask
  task automatic wait_state(input logic [6:0] s, input int limit, input string what);
    int n = 0;
    while (state[0] !== s && n < limit) begin @(posedge clk); n++; end
    chk(state[0] === s, what);
  endtask

  // Both PCEs get the same commands and must behave identically.
  always @(negedge clk) if (!rst) begin
    checks++;
    if (state[0] !== state[1] || sync[0] !== sync[1]) begin failures++; $display("FAIL PCEs differ"); end
  end

  // G-Link capture.
  logic [15:0] dav_words[NP][2][$];
  logic [7:0]  cav_bytes[NP][$];
  always @(posedge clk) for (int p = 0; p < NP; p++) begin
    if (glink_dav[p]) for (int g = 0; g < 2; g++) dav_words[p][g].push_back(glink_d[p][g]);
    if (glink_cav[p]) cav_bytes[p].push_back(glink_d[p][0][7:0]);
  end

  // VME write cycle.
  task automatic vme_write(input logic [7:0] a, input logic [15:0] v);
    vme_addr = a; vme_data = v; vme_write_n = 0;
    #10 vme_as_n = 0;
    #10 vme_ds_n = 0;
    while (vme_dtack_n) @(posedge vclk);
    #20 vme_ds_n = 1; vme_as_n = 1; vme_write_n = 1;
    while (!vme_dtack_n) @(posedge vclk);
    #10;
  endtask

  // Check the bytes one HDI delivered through the G-Link in a readout.
  task automatic check_readout(input int p, input int g, input bit hi, input int h, input string what,
                              input logic [15:0] id0 = 16'hAAAA, input logic [15:0] id1 = 16'hBBBB);
    logic [7:0] v[$], prev;
    int i0 = -1;
    for (int i = 0; i + 1 < dav_words[p][g].size(); i++)
      if (dav_words[p][g][i] === id0 && dav_words[p][g][i+1] === id1) i0 = i + 2;
    chk(i0 > 0, $sformatf("%s: ID bytes on G-Link %0d", what, g));
    if (i0 < 0) return;
    prev = id1[7:0];
    for (int i = i0; i < dav_words[p][g].size(); i++) begin
      logic [7:0] b = hi ? dav_words[p][g][i][15:8] : dav_words[p][g][i][7:0];
      if (b !== prev && b >= 8'h20) v.push_back(b);
      prev = b;
    end
    chk(v.size() === 6 + 3 * h, $sformatf("%s: HDI %0d gave %0d bytes", what, h, v.size()));
    foreach (v[k]) chk(v[k] === 8'h20 + 8'(h * 16) + 8'(k), $sformatf("%s: HDI %0d byte %0d", what, h, k));
  endtask

  int r0[NP][NH], xs0, t_rise, t_fall;
  realtime tr, tf;

  initial begin
    count_preset = '{default: 8'd0};
    foreach (chain[p, h]) chain[p][h] = '0;
    foreach (sent[i]) for (int b = 0; b < NBIT; b++) sent[i][b] = 1'($urandom);
    // Links start with a run of zeroes, as after power-up.
    g_p[0].u_sar.send_zeros(40);
    g_p[1].u_sar.send_zeros(40);
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // ---- synchronisation
    wait (sync[0] === 1'b1);
    n_lock++;
    send(CODE_IDLE, 3);
    drain();
    chk(sync === 2'b11, "both links in synch");

    // ---- power-up sequence
    send(CODE_PWR_UP, 2);
    wait_state(7'h45, 100, "power-up wait state");
    send(CODE_IDLE, 1);
    wait_state(7'h47, 100, "power-up closing state");
    chk(ch_mode === 2'b11, "power-up CH_MODE");
    n_pwrup++;
    drain();

    // ---- VME download of 10 chips (1820 bits) into all 8 HDI chains
    vme_write(8'h00, 16'h0001);
    wait_state(7'h43, 50, "initialize mode");
    for (int b = NBIT - 1; b >= 0; b--) begin
      automatic logic [15:0] w = '0;
      for (int i = 0; i < NP * NH; i++) w[i] = sent[i][b];
      vme_write(8'h01, w);
    end
    vme_write(8'h00, 16'h0000);
    wait_state(7'h00, 50, "download done");
    for (int p = 0; p < NP; p++) for (int h = 0; h < NH; h++)
      chk(chain[p][h] === sent[p * NH + h], $sformatf("download chain %0d.%0d", p, h));
    n_dnld++;

    // ---- acquisition, 132 ns bunch spacing
    send(CODE_ACQ, 1);
    wait_state(7'h04, 100, "acquisition run");
    repeat (20) @(posedge clk);
    foreach (r0[p, h]) r0[p][h] = rises[p][h];
    xs0 = g_p[0].u_sar.crossings;
    send(CODE_IDLE, 20);
    drain();
    for (int h = 0; h < NH; h++)
      chk(rises[0][h] - r0[0][h] - (g_p[0].u_sar.crossings - xs0) inside {[-1:1]},
          $sformatf("132 ns: %0d pipeline clocks for %0d crossings", rises[0][h] - r0[0][h],
                    g_p[0].u_sar.crossings - xs0));
    chk(g_p[0].u_sar.crossings - xs0 >= 20, "crossings sent");
    n_acq++;
    // ---- 395 ns bunch spacing: crossing bit in every third packet
    g_p[0].u_sar.xing_every = 3; g_p[1].u_sar.xing_every = 3;
    drain();
    repeat (14) @(posedge clk);
    foreach (r0[p, h]) r0[p][h] = rises[p][h];
    xs0 = g_p[1].u_sar.crossings;
    send(CODE_IDLE, 30);
    drain();
    chk(rises[1][2] - r0[1][2] - (g_p[1].u_sar.crossings - xs0) inside {[-1:1]},
        $sformatf("395 ns: %0d pipeline clocks for %0d crossings", rises[1][2] - r0[1][2],
                  g_p[1].u_sar.crossings - xs0));
    chk(g_p[1].u_sar.crossings - xs0 inside {[10:11]}, "one crossing in three packets");
    n_acq395++;
    g_p[0].u_sar.xing_every = 1; g_p[1].u_sar.xing_every = 1;

    // ---- preamp reset: pulse width set by the delay line
    send(CODE_RESET_PRE, 1);
    @(posedge hdi_bus[0][0][0]) tr = $realtime;
    @(negedge hdi_bus[0][0][0]) tf = $realtime;
    chk(tf - tr >= DLY_NS - 1 && tf - tr <= DLY_NS + 1, $sformatf("preamp reset pulse %0t", tf - tr));
    wait_state(7'h04, 100, "back to acquisition");
    n_prst++;
    drain();

    // ---- digitize: pipeline readout then digitization
    send(CODE_DIG, 1);
    wait_state(7'h10, 200, "pipeline readout");
    @(negedge clk);
    foreach (r0[p, h]) r0[p][h] = rises[p][h];
    wait_state(7'h34, 200, "pipeline readout done");
    for (int h = 0; h < NH; h++) chk(rises[0][h] - r0[0][h] == 8, "8 pipeline readout clocks");
    n_pipe++;
    foreach (r0[p, h]) r0[p][h] = rises[p][h];
    wait_state(7'h3C, 400, "digitization done");
    repeat (3) @(posedge clk);
    chk(rises[0][0] - r0[0][0] >= 256 && rises[0][0] - r0[0][0] <= 258,
        $sformatf("%0d digitization clocks", rises[0][0] - r0[0][0]));
    n_dig++;

    // ---- readout
    foreach (dav_words[p, g]) dav_words[p][g].delete();
    send(CODE_READOUT, 1);
    wait_state(7'h40, 100, "readout data");
    chk(!hdi_drv_en[0][0] && pri_in[0], "bus released to the chips");
    wait_state(7'h00, 200, "readout complete");
    for (int p = 0; p < NP; p++) for (int h = 0; h < NH; h++)
      check_readout(p, h / 2, h % 2, h, "readout");
    n_read++;
    drain();

    // ---- parity error
    cav_bytes[0].delete();
    g_p[0].u_sar.send_bad_parity(CODE_IDLE); g_p[1].u_sar.send_bad_parity(CODE_IDLE);
    send(CODE_IDLE, 2);
    drain();
    chk(cav_bytes[0].size() === 1 && cav_bytes[0][0] === 8'h02, "parity error control word");
    n_perr++;

    // ---- missing framing bit: report, zeroes, resynchronisation
    cav_bytes[0].delete();
    g_p[0].u_sar.send_no_frame(CODE_IDLE); g_p[1].u_sar.send_no_frame(CODE_IDLE);
    wait (sync[0] === 1'b0);
    wait (cav_bytes[0].size() > 0);
    chk(cav_bytes[0][0] === 8'h01, "loss-of-synch control word");
    n_nosync++;
    wait (sync[0] === 1'b1);
    send(CODE_IDLE, 3);
    drain();
    chk(sync === 2'b11, "resynchronised");
    n_resync++;

    // ---- diagnostic mode 0 during readout (state on G-Link 0, data on G-Link 1)
    send(CODE_DIAG0, 1);
    send(CODE_IDLE, 1);
    drain();
    chk(glink_d[0][0] === 16'h0000 && glink_d[1][0] === 16'h0000, "state 00 visible in diagnostic mode");
    foreach (dav_words[p, g]) dav_words[p][g].delete();
    send(CODE_READOUT, 1);
    wait_state(7'h40, 100, "readout in diagnostic mode");
    @(negedge clk);
    chk(glink_d[0][0] === 16'h4040 && hdi_drv_en[0][0] && !hdi_drv_en[0][2], "state 40 on G-Link 0");
    wait_state(7'h00, 200, "diagnostic readout complete");
    // In diagnostic mode the state replaces the ID bytes on the bus.
    check_readout(0, 1, 0, 2, "diag readout", 16'h3E3E, 16'h3F3F);
    check_readout(0, 1, 1, 3, "diag readout", 16'h3E3E, 16'h3F3F);
    n_diag++;
    // Reset code clears diagnostic mode and returns the main machine to idle.
    send(CODE_ACQ, 1);
    wait_state(7'h04, 100, "acquisition before reset");
    send(CODE_RESET, 1);
    wait_state(7'h00, 100, "reset code returns to idle");
    drain();
    chk(hdi_drv_en[0] === 4'hF && glink_d[0][0] === 16'h7171, "diagnostic mode cleared");
    n_rstcode++;

    // ---- G-Link loss of lock
    send(CODE_GLINK_LOCK, 5);
    wait (glink_ed[0] === 1'b0);
    repeat (20) begin @(posedge clk); chk(!glink_ed[0] && state[0] === 7'h00, "relock: ED low"); end
    drain();
    send(CODE_IDLE, 2);
    drain();
    chk(glink_ed === 2'b11, "relock done");
    n_relock++;

    // ---- digitize test pulse, then digitize and read out
    send(CODE_DIG_TP, 1);
    wait_state(7'h48, 100, "test pulse");
    chk(hdi_bus[0][1] === 8'hF6, "calibration inject byte");
    wait_state(7'h3C, 400, "test pulse digitized");
    foreach (dav_words[p, g]) dav_words[p][g].delete();
    send(CODE_READOUT, 1);
    wait_state(7'h40, 100, "test pulse readout");
    wait_state(7'h00, 200, "test pulse readout complete");
    check_readout(1, 0, 1, 1, "test pulse readout");
    n_tp++;

    $display("COUNT lock=%0d power_up=%0d download=%0d acq132=%0d acq395=%0d preamp_reset=%0d",
             n_lock, n_pwrup, n_dnld, n_acq, n_acq395, n_prst);
    $display("COUNT pipeline_readout=%0d digitize=%0d readout=%0d parity_err=%0d nosync=%0d resync=%0d",
             n_pipe, n_dig, n_read, n_perr, n_nosync, n_resync);
    $display("COUNT diag=%0d reset_code=%0d relock=%0d test_pulse=%0d", n_diag, n_rstcode, n_relock, n_tp);
    begin
      automatic int m[16] = '{n_lock, n_pwrup, n_dnld, n_acq, n_acq395, n_prst, n_pipe, n_dig, n_read, n_perr,
                    n_nosync, n_resync, n_diag, n_rstcode, n_relock, n_tp};
      foreach (m[i]) begin checks++; if (m[i] === 0) begin failures++; $display("FAIL mechanism %0d never ran", i); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
