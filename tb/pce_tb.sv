// pce_tb: one Port Card Equivalent with its counter and bus buffers.
//
// Checks the control byte on every HDI bus in idle, the number of 53 MHz
// clocks sent to the chips in digitization for a counter preset of 200
// (255-200 counted clocks plus the two clocks of enable latency), the
// G-Link words of a readout (ID bytes, then each HDI's bytes in its half of
// its G-Link), and that the download data and clock reach the HDIs only in
// initialize mode.
module pce_tb;
  import pc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, nrz;
  logic [3:0][7:0] svx_bus, hdi_bus;
  logic [3:0] pri_out, hdi_drv_en, hdi_sdata, svx_clk;
  logic dnld_en_async = 1'b0;
  logic [3:0] dnld_clk = '0, dnld_data = '0;
  logic [7:0] count_preset = 8'd200;
  logic prst_dly_ret = 1'b0, prst_dly_drive;
  logic mode0, mode1, ch_mode, pri_in, glink_dav, glink_cav, glink_ed, sync, read_status;
  logic [1:0][15:0] glink_d;
  logic [6:0] state;
  int   checks = 0, failures = 0, rises = 0, r0;
  logic [15:0] w[2][$];

  pce #(.N_HDI(4)) dut (.*);
  sar_link_model u_sar (.clk, .nrz);
  for (genvar h = 0; h < 4; h++) begin : g_h
    svx_hdi_model u_svx (.svx_clk(svx_clk[h]), .pri_in, .bus(svx_bus[h]), .pri_out(pri_out[h]));
    initial begin u_svx.n_bytes = 4 + h; u_svx.seed = 8'h20 + 8'(16 * h); end
  end

  always #9.4 clk = ~clk;
  always @(posedge svx_clk[3]) rises++;
  always @(posedge clk) if (glink_dav) begin w[0].push_back(glink_d[0]); w[1].push_back(glink_d[1]); end
  always @(posedge clk) prst_dly_ret <= prst_dly_drive;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic wait_state(input logic [6:0] s, input string what);
    int n = 0;
    while (state !== s && n < 1000) begin @(posedge clk); n++; end
    chk(state === s, what);
  endtask

  initial begin
    u_sar.send_zeros(20);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (sync);
    u_sar.send(CODE_IDLE, 2); u_sar.drain();
    for (int h = 0; h < 4; h++) chk(hdi_bus[h] == 8'h71 && hdi_drv_en[h], "idle byte on HDI bus");
    // Download pass-through.
    dnld_en_async = 1'b1;
    wait_state(7'h43, "initialize mode");
    r0 = rises;
    for (int k = 0; k < 5; k++) begin
      dnld_data = 4'(k); #5 dnld_clk = 4'hF; #1 chk(hdi_sdata === 4'(k), "download data"); #10 dnld_clk = 4'h0; #10;
    end
    chk(rises - r0 === 5, "download clocks reach the HDIs");
    dnld_en_async = 1'b0;
    wait_state(7'h00, "download done");
    // Digitize from idle.
    u_sar.send(CODE_DIG);
    wait_state(7'h34, "digitize");
    r0 = rises;
    wait_state(7'h3C, "digitization done");
    repeat (3) @(posedge clk);
    chk(rises - r0 === 255 - 200 + 2, $sformatf("%0d digitization clocks", rises - r0));
    // Readout.
    u_sar.send(CODE_READOUT);
    wait_state(7'h40, "readout");
    wait_state(7'h00, "readout done");
    chk(w[0][0] === 16'hAAAA && w[0][1] === 16'hBBBB && w[1][0] === 16'hAAAA && w[1][1] === 16'hBBBB, "ID words");
    for (int h = 0; h < 4; h++) begin
      automatic logic [7:0] got[$];
      automatic logic [7:0] prev;
      prev = 8'hBB;
      for (int i = 2; i < w[h / 2].size(); i++) begin
        automatic logic [7:0] b = (h % 2) ? w[h / 2][i][15:8] : w[h / 2][i][7:0];
        if (b !== prev && b !== 8'h00) got.push_back(b);
        prev = b;
      end
      chk(got.size() === 4 + h, $sformatf("HDI %0d: %0d bytes", h, got.size()));
      foreach (got[k]) chk(got[k] === 8'h20 + 8'(16 * h + k), "HDI byte value");
    end
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
