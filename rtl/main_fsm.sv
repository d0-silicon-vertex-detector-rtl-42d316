// main_fsm: the "Main" state machine that sequences the SVX-II chips.
//
// Runs at the 53 MHz link clock; every state lasts one clock (18.8 ns), and
// the SVX-II timing rules are met by chains of states.  From IDLE it follows
// the decoded control lines:
//   acquisition   three set-up states, then ACQ_RUN: the crossing pulses are
//                 routed to the SVX-II clock (`enacro`).  ACQ_RUN waits for
//                 digitize (-> pipeline readout) or reset-preamp (-> an
//                 11-state preamp reset loop back to ACQ_RUN).
//   pipeline readout  36 states with MODE0 high; the pipeline clock stops and
//                 `smclk` gives the chips eight single clock pulses in three
//                 groups while the control byte steps through its values.
//   digitization  eight states in digitize mode; 53 MHz is sent to the chips
//                 and the external counter (`ena53`) until its ripple carry
//                 (`rco_n` low), then DIG_DONE waits for the readout code.
//   readout       one set-up state, then DAV with the two Port Card ID bytes
//                 (PCID0, PCID1) on the bus, then the bus is released
//                 (`bus_en` low), the chips get 53/2 MHz (`ena26`) and
//                 priority-in; it ends when priority-out has been seen from
//                 every HDI, followed by two closing states.
//   download      held while the download interface asserts `dnld_en`.
//   power-up      waits for an IDLE code after the power-up code, then two
//                 closing states.
//   test pulse    two states with the calibration-inject byte, then the
//                 digitization sequence and, on command, readout.
//   digitize / readout codes in IDLE enter those sequences directly.
// The state is a seven-bit number (`state`, read out in diagnostic mode);
// its values, the per-state control byte `d`, the MODE0/MODE1/CH_MODE levels
// and the branch conditions follow the document's state machine.  Three
// details are this design's own reading and are marked below: the path of
// the test-pulse branch, the mode bits of the two ID states, and waiting in
// DIG_DONE for the readout code rather than starting readout at once.  The
// clock enables `enacro`, `ena53`, `ena26` are registered (one clock after
// the state that requests them), as in the document; `smclk`, `dav`,
// `bus_en`, `pri_in` and the mode lines are decoded from the state register.
// Priority-out is remembered per HDI during readout so that chains which
// finish at different times are all seen (this design's choice).
module main_fsm
  import pc_pkg::*;
#(
  parameter int unsigned N_HDI = 4,
  parameter logic [7:0]  PCID0 = 8'hAA,
  parameter logic [7:0]  PCID1 = 8'hBB
) (
  input  logic              clk,
  input  logic              rst,       // synchronous: board reset, reset code, G-Link relock
  input  ctrl_lines_t       cmd,       // decoded control lines
  input  logic              rco_n,     // digitization counter ripple carry, active low
  input  logic [N_HDI-1:0]  pri_out,   // SVX-II priority out of each HDI
  input  logic              dnld_en,   // download interface requests initialize mode
  output logic [6:0]        state,
  output logic [7:0]        d,         // HDI control byte
  output logic              mode0,
  output logic              mode1,
  output logic              ch_mode,
  output logic              bus_en,    // EPLD drives the HDI buses
  output logic              dav,       // G-Link data available
  output logic              pri_in,    // SVX-II priority in
  output logic              smclk,     // single SVX-II clock pulses, pipeline readout
  output logic              enacro,    // crossing pulses to the SVX-II clock
  output logic              ena53,     // 53 MHz to SVX-II and counter
  output logic              ena26,     // 26.5 MHz to SVX-II (readout)
  output logic              reading,   // readout sequence in progress
  output logic              prst_req,  // preamp reset loop active
  output logic              dnld_sel   // initialize (download) mode
);
  // State numbers.
  localparam logic [6:0] S_IDLE      = 7'h00;
  localparam logic [6:0] S_ACQ1      = 7'h01;
  localparam logic [6:0] S_ACQ3      = 7'h03;
  localparam logic [6:0] S_ACQ_RUN   = 7'h04;
  localparam logic [6:0] S_PRST_F    = 7'h05;  // preamp reset loop, first
  localparam logic [6:0] S_PRST_L    = 7'h0F;  //                    last
  localparam logic [6:0] S_PIPE_F    = 7'h10;  // pipeline readout, first
  localparam logic [6:0] S_PIPE_L    = 7'h33;  //                   last
  localparam logic [6:0] S_DIG_F     = 7'h34;  // digitize sequence, first
  localparam logic [6:0] S_DIG_CNT   = 7'h3B;  // counting
  localparam logic [6:0] S_DIG_DONE  = 7'h3C;
  localparam logic [6:0] S_RD_SET    = 7'h3D;
  localparam logic [6:0] S_RD_ID0    = 7'h3E;
  localparam logic [6:0] S_RD_ID1    = 7'h3F;
  localparam logic [6:0] S_RD_DATA   = 7'h40;
  localparam logic [6:0] S_RD_END1   = 7'h41;
  localparam logic [6:0] S_RD_END2   = 7'h42;
  localparam logic [6:0] S_DNLD      = 7'h43;
  localparam logic [6:0] S_DNLD_END  = 7'h44;
  localparam logic [6:0] S_PWR_WAIT  = 7'h45;
  localparam logic [6:0] S_PWR1      = 7'h46;
  localparam logic [6:0] S_PWR2      = 7'h47;
  localparam logic [6:0] S_CAL1      = 7'h48;
  localparam logic [6:0] S_CAL2      = 7'h49;
  localparam logic [6:0] S_IDLE2DIG  = 7'h4A;
  localparam logic [6:0] S_IDLE2RD   = 7'h4B;

  logic [6:0]       nxt;
  logic [N_HDI-1:0] pri_seen;
  logic             all_pri;
  logic             encro, en53, en26;

  assign all_pri = &(pri_seen | pri_out);

  // Next state.
  always_comb begin
    nxt = S_IDLE;
    if (state == S_IDLE) begin
      if      (dnld_en)     nxt = S_DNLD;
      else if (cmd.pwr_up)  nxt = S_PWR_WAIT;
      else if (cmd.acq)     nxt = S_ACQ1;
      else if (cmd.dig)     nxt = S_IDLE2DIG;
      else if (cmd.readout) nxt = S_IDLE2RD;
      else if (cmd.dig_tp)  nxt = S_CAL1;   // this design's reading: calibration-inject states first
      else                  nxt = S_IDLE;
    end
    else if (state inside {[S_ACQ1:S_ACQ3]})        nxt = state + 7'd1;
    else if (state == S_ACQ_RUN) begin
      if      (cmd.dig)       nxt = S_PIPE_F;
      else if (cmd.reset_pre) nxt = S_PRST_F;
      else                    nxt = S_ACQ_RUN;
    end
    else if (state == S_PRST_L)                      nxt = S_ACQ_RUN;
    else if (state inside {[S_PRST_F:S_PRST_L]})     nxt = state + 7'd1;
    else if (state inside {[S_PIPE_F:S_PIPE_L]})     nxt = state + 7'd1;  // S_PIPE_L + 1 = S_DIG_F
    else if (state inside {[S_DIG_F:S_DIG_CNT-7'd1]}) nxt = state + 7'd1;
    else if (state == S_DIG_CNT)                     nxt = rco_n ? S_DIG_CNT : S_DIG_DONE;
    else if (state == S_DIG_DONE)                    nxt = cmd.readout ? S_RD_SET : S_DIG_DONE;  // waits for the readout code
    else if (state inside {[S_RD_SET:S_RD_ID1]})     nxt = state + 7'd1;
    else if (state == S_RD_DATA)                     nxt = all_pri ? S_RD_END1 : S_RD_DATA;
    else if (state == S_RD_END1)                     nxt = S_RD_END2;
    else if (state == S_DNLD)                        nxt = dnld_en ? S_DNLD : S_DNLD_END;
    else if (state == S_PWR_WAIT)                    nxt = cmd.idle ? S_PWR1 : S_PWR_WAIT;
    else if (state == S_PWR1)                        nxt = S_PWR2;
    else if (state == S_CAL1)                        nxt = S_CAL2;
    else if (state == S_CAL2)                        nxt = S_DIG_F;   // then the normal digitize sequence
    else if (state == S_IDLE2DIG)                    nxt = S_DIG_F;
    else if (state == S_IDLE2RD)                     nxt = S_RD_SET;
    // S_RD_END2, S_DNLD_END, S_PWR2 and unused codes return to IDLE.
  end

  // Outputs decoded from the state.
  always_comb begin
    d       = 8'h00;
    mode0   = 1'b0;
    mode1   = 1'b0;
    ch_mode = 1'b0;
    bus_en  = 1'b1;
    dav     = 1'b0;
    pri_in  = 1'b0;
    smclk   = 1'b0;
    encro   = 1'b0;
    en53    = 1'b0;
    en26    = 1'b0;
    if (state == S_IDLE) d = 8'h71;
    else if (state == S_ACQ1) begin ch_mode = 1'b1; d = 8'h71; end
    else if (state == 7'h02) begin mode0 = 1'b1; ch_mode = 1'b1; d = 8'h78; end
    else if (state == S_ACQ3) begin mode0 = 1'b1; d = 8'h78; end
    else if (state == S_ACQ_RUN) begin mode0 = 1'b1; encro = 1'b1; d = 8'h7C; end
    else if (state inside {[S_PRST_F:S_PRST_L]}) begin
      mode0 = 1'b1; encro = 1'b1; d = 8'h7D;   // bit 0: preamp reset
    end
    else if (state inside {[S_PIPE_F:S_PIPE_L]}) begin
      mode0 = 1'b1;
      smclk = state inside {[7'h11:7'h13], [7'h20:7'h21], [7'h28:7'h2A]};
      if      (state <= 7'h16) d = 8'h78;
      else if (state <= 7'h1E) d = 8'h70;
      else if (state == 7'h1F) d = 8'h30;
      else if (state <= 7'h2D) d = 8'h38;
      else                     d = 8'h30;
    end
    else if (state == S_DIG_F) begin mode0 = 1'b1; ch_mode = 1'b1; d = 8'h30; end
    else if (state == 7'h35) begin mode1 = 1'b1; mode0 = 1'b1; ch_mode = 1'b1; d = 8'hB2; end
    else if (state inside {[7'h36:S_DIG_CNT]}) begin
      mode1 = 1'b1; mode0 = 1'b1; en53 = 1'b1;
      case (state)
        7'h36:     d = 8'hB2;
        7'h37:     d = 8'hB0;
        S_DIG_CNT: d = 8'h80;
        default:   d = 8'hA0;
      endcase
    end
    else if (state == S_DIG_DONE) begin mode1 = 1'b1; mode0 = 1'b1; d = 8'h03; end
    // Readout: the mode bits of the two ID states are this design's choice,
    // kept as in the set-up state.
    else if (state == S_RD_SET) begin ch_mode = 1'b1; mode1 = 1'b1; mode0 = 1'b1; d = 8'h71; end
    else if (state == S_RD_ID0) begin dav = 1'b1; ch_mode = 1'b1; mode1 = 1'b1; mode0 = 1'b1; d = PCID0; end
    else if (state == S_RD_ID1) begin dav = 1'b1; ch_mode = 1'b1; mode1 = 1'b1; mode0 = 1'b1; d = PCID1; end
    else if (state == S_RD_DATA) begin
      dav = 1'b1; bus_en = 1'b0; en26 = 1'b1; pri_in = 1'b1; mode1 = 1'b1; d = 8'h7F;
    end
    else if (state == S_RD_END1) begin ch_mode = 1'b1; mode1 = 1'b1; d = 8'h7F; end
    else if (state == S_RD_END2) begin ch_mode = 1'b1; d = 8'h00; end
    else if (state == S_DNLD)     d = 8'h71;
    else if (state == S_DNLD_END) d = 8'hF1;
    else if (state == S_PWR_WAIT) d = 8'h00;
    else if (state == S_PWR1) begin ch_mode = 1'b1; d = 8'h00; end
    else if (state == S_PWR2) begin ch_mode = 1'b1; d = 8'h71; end
    else if (state inside {S_CAL1, S_CAL2}) d = 8'hF6;   // calibration inject
    else if (state == S_IDLE2DIG) begin ch_mode = 1'b1; d = 8'h30; end
    else if (state == S_IDLE2RD)  begin ch_mode = 1'b1; d = 8'h03; end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      enacro   <= 1'b0;
      ena53    <= 1'b0;
      ena26    <= 1'b0;
      pri_seen <= '0;
    end else begin
      state  <= nxt;
      enacro <= encro;
      ena53  <= en53;
      ena26  <= en26;
      if (state == S_RD_DATA) pri_seen <= pri_seen | pri_out;
      else                    pri_seen <= '0;
    end
  end

  assign reading  = state inside {[S_RD_SET:S_RD_END2]};
  assign prst_req = state inside {[S_PRST_F:S_PRST_L]};
  assign dnld_sel = (state == S_DNLD);

  // The EPLD never drives the buses while the chips are reading out.
  a_bus_released: assert property (@(posedge clk) disable iff (rst) pri_in |-> !bus_en);
endmodule
