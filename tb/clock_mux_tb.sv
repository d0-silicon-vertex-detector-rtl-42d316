// clock_mux_tb: counts the rising edges of the SVX-II clock in each mode.
//
// Over a window of 40 link clocks: crossing pulses give one edge per
// crossing, the single-pulse request one edge per requested cycle, the
// 53 MHz enable one edge per clock, the readout enable one edge per two
// clocks, and the download selection passes each HDI's download clock.
module clock_mux_tb;
  localparam int N = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic enacro = 0, xing = 0, smclk = 0, ena53 = 0, ena26 = 0, dnld_sel = 0;
  logic [N-1:0] dnld_clk = '0;
  logic [N-1:0] svx_clk;
  int   edges[N];
  int   checks = 0, failures = 0;

  clock_mux #(.N_HDI(N)) dut (.*);

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g_cnt
    always @(posedge svx_clk[i]) edges[i]++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic clear;
    foreach (edges[i]) edges[i] = 0;
  endtask

  task automatic window(input int exp, input string what);
    clear();
    repeat (40) @(negedge clk);
    // let a pending gated pulse finish before disabling
    {enacro, xing, smclk, ena53, ena26} = '0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < N; i++) chk(edges[i] == exp, $sformatf("%s: hdi %0d %0d edges exp %0d", what, i, edges[i], exp));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (3) @(negedge clk);
    window(0, "idle");
    // Acquisition: crossing pulse every third link clock (test pattern).
    fork
      begin enacro = 1; window(14, "crossings"); end
      begin
        for (int k = 0; k < 40; k++) begin
          xing = (k % 3 === 0);
          @(negedge clk);
        end
        xing = 0;
      end
    join
    // Single pulses: request on 5 separate cycles.
    fork
      window(5, "single pulses");
      begin
        for (int k = 0; k < 40; k++) begin
          smclk = (k inside {2, 3, 10, 20, 30});
          @(negedge clk);
        end
        smclk = 0;
      end
    join
    ena53 = 1; window(40, "53 MHz");
    ena26 = 1; window(20, "26.5 MHz");
    // Download: each HDI's own clock passes.
    dnld_sel = 1; clear();
    for (int k = 0; k < 6; k++) begin
      dnld_clk = 4'b0101 | {k[0], 1'b0, k[0], 1'b0};
      @(negedge clk);
      dnld_clk = '0;
      @(negedge clk);
    end
    chk(edges[0] === 6 && edges[2] === 6, "download clock hdi 0/2");
    chk(edges[1] === 3 && edges[3] === 3, "download clock hdi 1/3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
