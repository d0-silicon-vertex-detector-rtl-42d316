// port_card: one Port Card board.
//
// A board holds N_PCE Port Card Equivalents, each with its own control-link
// fibres (53 MHz clock and NRZ data), four HDIs and two G-Link transmitters,
// and one VME interface that downloads all N_PCE*4 HDI chip strings in
// parallel: each VME data write carries one bit per HDI, and its DTACK
// clocks every chain.  The two-PCE default follows the document ("two or
// possibly three"); the VME interface runs on its own clock `vme_clk`.
// Signals of parts outside the RTL (optical receivers, G-Link transmitters,
// delay lines, SVX-II chips) are ports, flattened per PCE.
module port_card
  import pc_pkg::*;
#(
  parameter int unsigned N_PCE = 2,
  parameter logic [7:0]  PCID0 = 8'hAA,
  parameter logic [7:0]  PCID1 = 8'hBB
) (
  input  logic [N_PCE-1:0]             clk53,
  input  logic                         rst,
  input  logic [N_PCE-1:0]             nrz,
  input  logic [N_PCE-1:0][3:0][7:0]   svx_bus,
  input  logic [N_PCE-1:0][3:0]        pri_out,
  input  logic [N_PCE-1:0][7:0]        count_preset,
  input  logic [N_PCE-1:0]             prst_dly_ret,
  // VME download interface
  input  logic                         vme_clk,
  input  logic                         vme_as_n,
  input  logic                         vme_ds_n,
  input  logic                         vme_write_n,
  input  logic [7:0]                   vme_addr,
  input  logic [15:0]                  vme_data,
  output logic                         vme_dtack_n,
  // Towards HDIs
  output logic [N_PCE-1:0][3:0][7:0]   hdi_bus,
  output logic [N_PCE-1:0][3:0]        hdi_drv_en,
  output logic [N_PCE-1:0][3:0]        hdi_sdata,
  output logic [N_PCE-1:0][3:0]        svx_clk,
  output logic [N_PCE-1:0]             mode0,
  output logic [N_PCE-1:0]             mode1,
  output logic [N_PCE-1:0]             ch_mode,
  output logic [N_PCE-1:0]             pri_in,
  // Towards G-Link transmitters
  output logic [N_PCE-1:0][1:0][15:0]  glink_d,
  output logic [N_PCE-1:0]             glink_dav,
  output logic [N_PCE-1:0]             glink_cav,
  output logic [N_PCE-1:0]             glink_ed,
  // Preamp reset delay lines and status
  output logic [N_PCE-1:0]             prst_dly_drive,
  output logic [N_PCE-1:0]             sync,
  output logic [N_PCE-1:0][6:0]        state,
  output logic [N_PCE-1:0]             read_status
);
  logic                   dnld_en, dnld_clk;
  logic [N_PCE*4-1:0]     sdata;

  vme_download #(.N_BITS(N_PCE*4), .ADDR_W(8)) u_vme (
    .clk(vme_clk), .rst, .as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n),
    .addr(vme_addr), .data(vme_data), .dtack_n(vme_dtack_n),
    .dnld_en, .sdata, .dnld_clk);

  for (genvar p = 0; p < N_PCE; p++) begin : g_pce
    pce #(.N_HDI(HDI_PER_PCE), .PCID0(PCID0), .PCID1(PCID1)) u_pce (
      .clk(clk53[p]), .rst, .nrz(nrz[p]), .svx_bus(svx_bus[p]), .pri_out(pri_out[p]),
      .dnld_en_async(dnld_en), .dnld_clk({4{dnld_clk}}), .dnld_data(sdata[4*p +: 4]),
      .count_preset(count_preset[p]), .prst_dly_ret(prst_dly_ret[p]),
      .hdi_bus(hdi_bus[p]), .hdi_drv_en(hdi_drv_en[p]), .hdi_sdata(hdi_sdata[p]),
      .svx_clk(svx_clk[p]), .mode0(mode0[p]), .mode1(mode1[p]), .ch_mode(ch_mode[p]),
      .pri_in(pri_in[p]), .glink_d(glink_d[p]), .glink_dav(glink_dav[p]),
      .glink_cav(glink_cav[p]), .glink_ed(glink_ed[p]),
      .prst_dly_drive(prst_dly_drive[p]), .sync(sync[p]), .state(state[p]),
      .read_status(read_status[p]));
  end
endmodule
