// pce: one Port Card Equivalent.
//
// Serves four HDIs (each a string of SVX-II chips on an eight-bit bus) and
// two G-Link transmitters.  It holds the EPLD, the divide-by-256
// digitization counter and the bus buffers/transceivers.  The optical
// receivers, G-Link transmitters, lasers, level translators and delay lines
// are outside this RTL: their logic-level signals are ports.  The download
// enable comes from the board's VME interface, which runs on another clock,
// and is synchronised here with two flip-flops (this design's choice); the
// serial download data passes straight to the HDIs.
module pce #(
  parameter int unsigned N_HDI = 4,
  parameter logic [7:0]  PCID0 = 8'hAA,
  parameter logic [7:0]  PCID1 = 8'hBB
) (
  input  logic                    clk,           // 53 MHz link clock
  input  logic                    rst,
  input  logic                    nrz,
  input  logic [N_HDI-1:0][7:0]   svx_bus,       // driven by the chips in readout
  input  logic [N_HDI-1:0]        pri_out,
  input  logic                    dnld_en_async,
  input  logic [N_HDI-1:0]        dnld_clk,
  input  logic [N_HDI-1:0]        dnld_data,
  input  logic [7:0]              count_preset,  // sets the digitization length
  input  logic                    prst_dly_ret,
  output logic [N_HDI-1:0][7:0]   hdi_bus,
  output logic [N_HDI-1:0]        hdi_drv_en,
  output logic [N_HDI-1:0]        hdi_sdata,     // serial download data
  output logic [N_HDI-1:0]        svx_clk,
  output logic                    mode0,
  output logic                    mode1,
  output logic                    ch_mode,
  output logic                    pri_in,
  output logic [N_HDI/2-1:0][15:0] glink_d,
  output logic                    glink_dav,
  output logic                    glink_cav,
  output logic                    glink_ed,
  output logic                    prst_dly_drive,
  output logic                    sync,
  output logic [6:0]              state,
  output logic                    read_status
);
  logic [1:0]         dnld_s;
  logic [7:0]         a;
  logic [N_HDI/2-1:0] pair_en;
  logic               rco_n, cnt_en;
  logic [7:0]         cnt_q;

  always_ff @(posedge clk) begin
    if (rst) dnld_s <= '0;
    else     dnld_s <= {dnld_s[0], dnld_en_async};
  end

  epld #(.N_HDI(N_HDI), .PCID0(PCID0), .PCID1(PCID1)) u_epld (
    .clk, .rst, .nrz, .rco_n, .pri_out, .dnld_en(dnld_s[1]), .dnld_clk, .prst_dly_ret,
    .a, .pair_en, .cav(glink_cav), .dav(glink_dav), .ed(glink_ed),
    .mode0, .mode1, .ch_mode, .pri_in, .svx_clk, .cnt_en, .prst_dly_drive,
    .sync, .state, .read_status);

  dig_counter #(.WIDTH(8)) u_cnt (
    .clk, .rst, .en(cnt_en), .preset(count_preset), .q(cnt_q), .rco_n);

  hdi_bus_switch #(.N_HDI(N_HDI)) u_bus (
    .a, .pair_en, .svx_bus, .hdi_bus, .hdi_drv_en, .glink_d);

  assign hdi_sdata = dnld_data;
endmodule
