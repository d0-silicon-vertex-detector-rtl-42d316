// epld: the Port Card Equivalent's control logic (one programmable device).
//
// Turns the serial control link into SVX-II control.  The link bit is
// shifted into `packet_shifter`; `sync_fsm` finds the framing bit and
// strobes `packet_latch` once per seven-bit packet; `code_decoder` turns the
// latched code into control lines and `parity_check` checks the packet.
// `master_fsm` reports parity errors and loss of synch through the G-Link,
// handles G-Link relocking and the diagnostic modes; `main_fsm` sequences the
// chips.  `data_mux` picks the byte for the HDI buses and G-Links,
// `clock_mux` the clock for each HDI, and `preamp_pulse` shapes the preamp
// reset with the external delay line.  Everything runs on the 53 MHz link
// clock.  The main machine is reset by the board reset, by the "reset port
// card" code, and during a G-Link relock; the wiring of those resets is this
// design's reading of the document.
module epld
  import pc_pkg::*;
#(
  parameter int unsigned N_HDI = 4,
  parameter logic [7:0]  PCID0 = 8'hAA,
  parameter logic [7:0]  PCID1 = 8'hBB
) (
  input  logic             clk,        // 53 MHz link clock
  input  logic             rst,        // board reset
  input  logic             nrz,        // link data
  input  logic             rco_n,      // from the digitization counter
  input  logic [N_HDI-1:0] pri_out,
  input  logic             dnld_en,    // synchronised to clk
  input  logic [N_HDI-1:0] dnld_clk,
  input  logic             prst_dly_ret,
  output logic [7:0]       a,          // byte to the bus buffers
  output logic [N_HDI/2-1:0] pair_en,  // bus buffer enables per HDI pair
  output logic             cav,
  output logic             dav,
  output logic             ed,
  output logic             mode0,
  output logic             mode1,
  output logic             ch_mode,
  output logic             pri_in,
  output logic [N_HDI-1:0] svx_clk,
  output logic             cnt_en,     // digitization counter enable
  output logic             prst_dly_drive,
  output logic             sync,
  output logic [6:0]       state,
  output logic             read_status // decoded, no function assigned
);
  logic [PKT_BITS-1:0] sr;  // sr[6] (framing bit) is checked by sync_fsm, not latched
  logic        lat;
  pkt_t        pkt;
  logic        new_pkt, xing, perr;
  ctrl_lines_t cmd;
  logic        bus_en, reading, notify, la, nosync, par_err_b, relock_rst;
  logic        bus_en0, bus_en1;
  logic        main_rst;
  logic [7:0]  d_main, d_shaped;
  logic        smclk, enacro, ena53, ena26, prst_req, dnld_sel;

  sync_fsm #(.PKT_LEN(PKT_BITS)) u_sync (.clk, .rst, .nrz, .sync, .lat);
  packet_shifter #(.WIDTH(PKT_BITS)) u_sr (.clk, .rst, .nrz, .q(sr));
  packet_latch u_lat (.clk, .rst, .lat, .d(sr[5:0]), .pkt, .new_pkt, .xing);
  parity_check u_par (.pkt, .new_pkt, .err(perr));
  code_decoder u_dec (.code(pkt.code), .lines(cmd));

  master_fsm u_master (
    .clk, .rst, .par_err_in(perr), .reset_code(cmd.reset), .lock_code(cmd.glink_lock),
    .diag0_code(cmd.diag0), .diag1_code(cmd.diag1), .sync, .bus_en, .reading,
    .bus_en0, .bus_en1, .cav, .ed, .notify, .la, .nosync, .par_err(par_err_b), .relock_rst);

  assign main_rst = rst | cmd.reset | relock_rst;

  main_fsm #(.N_HDI(N_HDI), .PCID0(PCID0), .PCID1(PCID1)) u_main (
    .clk, .rst(main_rst), .cmd, .rco_n, .pri_out, .dnld_en,
    .state, .d(d_main), .mode0, .mode1, .ch_mode, .bus_en, .dav, .pri_in, .smclk,
    .enacro, .ena53, .ena26, .reading, .prst_req, .dnld_sel);

  preamp_pulse u_prst (.prst_req, .d0(d_main[0]), .dly_ret(prst_dly_ret),
                       .dly_drive(prst_dly_drive), .d0_out(d_shaped[0]));
  assign d_shaped[7:1] = d_main[7:1];

  data_mux u_dmux (.d(d_shaped), .state, .notify, .la, .par_err(par_err_b), .nosync, .a);

  clock_mux #(.N_HDI(N_HDI)) u_cmux (
    .clk, .rst, .enacro, .xing, .smclk, .ena53, .ena26, .dnld_sel, .dnld_clk, .svx_clk);

  // HDI pairs 0 and 1 correspond to G-Links 0 and 1.
  always_comb begin
    pair_en = '0;
    pair_en[0] = bus_en0;
    if (N_HDI / 2 > 1) pair_en[N_HDI/2-1] = bus_en1;
  end

  assign cnt_en      = ena53;
  assign read_status = cmd.read_status;
endmodule
