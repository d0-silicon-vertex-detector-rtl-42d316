// vme_download_tb: downloads a full chain of ten SVX-II chips (1820 bits)
// into each of eight HDIs through the VME interface and checks what the
// chains received.
//
// A VME master task makes write cycles (AS, DS, wait for DTACK, release).
// Each HDI chain is modelled by a shift register clocked by the download
// clock; after the download each must hold exactly its random bit stream.
// Also checks the download enable register, that a cycle to another address
// is not acknowledged, and the duration of one transfer in clocks.
module vme_download_tb;
  localparam int NB = 8, CHIP_BITS = 182, CHIPS = 10, NBIT = CHIP_BITS * CHIPS;
  logic clk = 1'b0, rst = 1'b1;
  logic as_n = 1, ds_n = 1, write_n = 1;
  logic [7:0] addr = '0;
  logic [15:0] data = '0;
  logic dtack_n, dnld_en, dnld_clk;
  logic [NB-1:0] sdata;
  logic [NBIT-1:0] chain[NB];
  logic [NBIT-1:0] sent[NB];
  int   checks = 0, failures = 0, clocks = 0, cyc;

  vme_download #(.N_BITS(NB), .ADDR_W(8), .BASE_ADDR(8'h40)) dut (.*);

  always #12.5 clk = ~clk;   // 40 MHz board clock (assumed)

  always @(posedge dnld_clk) begin
    clocks++;
    for (int h = 0; h < NB; h++) chain[h] <= {chain[h][NBIT-2:0], sdata[h]};
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // One VME write; returns the number of board clocks until DTACK.
  task automatic vme_write(input logic [7:0] a, input logic [15:0] v, output int n, input bit expect_ack = 1);
    addr = a; data = v; write_n = 0;
    #10 as_n = 0;
    #10 ds_n = 0;
    n = 0;
    while (dtack_n && n < 20) begin @(posedge clk); n++; end
    if (expect_ack) chk(!dtack_n, "DTACK");
    #20 ds_n = 1; as_n = 1; write_n = 1;
    while (!dtack_n) @(posedge clk);
    #10;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    foreach (chain[h]) chain[h] = '0;
    foreach (sent[h]) for (int i = 0; i < NBIT; i++) sent[h][i] = 1'($urandom);
    vme_write(8'h40, 16'h0001, cyc);
    chk(dnld_en, "download enable set");
    vme_write(8'h13, 16'h00FF, cyc, 0);
    chk(dtack_n && clocks === 0 && sdata === '0, "other address ignored");
    for (int i = NBIT - 1; i >= 0; i--) begin
      automatic logic [15:0] w = '0;
      for (int h = 0; h < NB; h++) w[h] = sent[h][i];
      vme_write(8'h41, w, cyc);
      if (i === 0) chk(cyc <= 5, $sformatf("transfer acknowledged after %0d clocks", cyc));
    end
    vme_write(8'h40, 16'h0000, cyc);
    chk(!dnld_en, "download enable cleared");
    chk(clocks === NBIT, $sformatf("%0d download clocks", clocks));
    for (int h = 0; h < NB; h++) chk(chain[h] == sent[h], $sformatf("chain %0d contents", h));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
