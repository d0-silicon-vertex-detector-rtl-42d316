// master_fsm: the small "Master" state machine of the EPLD.
//
// It reports link errors to the readout board, handles G-Link relocking and
// latches the diagnostic ("remote logic analyser") modes.
//   * Loss of G-Link lock: while the loss-of-lock code is received it holds
//     `relock_rst` high and `ed` (G-Link enable-data) low; the SAR repeats
//     the code until its receiver has locked again.  This has priority.
//   * Loss of synch (`sync` low) and a parity error (`par_err_in` pulse) are
//     each reported as one G-Link control word: NOTIFY switches the data
//     multiplexer to the error byte, one cycle later CAV (control available)
//     strobes it into the G-Link.  Neither is reported while the SVX-II chips
//     are being read out (`reading`); a loss of synch is reported once
//     readout ends.  After a loss-of-synch report the machine waits until
//     synch is back.
//   * Diagnostic modes 0 and 1 are latched by their codes and cleared by the
//     Port Card reset code.  Each keeps the bus buffers of its G-Link's two
//     HDIs enabled so that the main state machine's state reaches the SAR.
// Sequence, priorities and diagnostic latching follow the document.  The
// exact cycle in which NOTIFY, NOSYNC, PAR_ERR and CAV are raised within each
// report is this design's reading of it (set-up cycle, strobe cycle, and one
// hold cycle for parity).  All outputs are combinational from registered
// state.  `rst` is the board (VME) reset.
module master_fsm (
  input  logic clk,
  input  logic rst,
  input  logic par_err_in,   // parity error pulse from the checker
  input  logic reset_code,   // "reset port card" code decoded
  input  logic lock_code,    // "G-Link loss of lock" code decoded
  input  logic diag0_code,
  input  logic diag1_code,
  input  logic sync,         // synchroniser in its working loop
  input  logic bus_en,       // main state machine drives the HDI buses
  input  logic reading,      // SVX-II readout in progress
  output logic bus_en0,      // buffers/transceivers of HDI pair 0 (G-Link 0)
  output logic bus_en1,      // buffers/transceivers of HDI pair 1 (G-Link 1)
  output logic cav,          // G-Link control-available strobe
  output logic ed,           // G-Link enable data
  output logic notify,       // select the error byte
  output logic la,           // diagnostic mode active
  output logic nosync,       // error byte bit: loss of synch
  output logic par_err,      // error byte bit: parity error
  output logic relock_rst    // G-Link relock in progress; resets the main machine
);
  typedef enum logic [3:0] {
    M_IDLE, M_RELOCK,
    M_NS_SETUP, M_NS_STROBE, M_NS_WAIT,
    M_PE_SETUP, M_PE_STROBE, M_PE_HOLD
  } mstate_e;

  mstate_e state;
  logic    la0, la1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= M_IDLE;
      la0   <= 1'b0;
      la1   <= 1'b0;
    end else begin
      unique case (state)
        M_IDLE:
          if (lock_code)                state <= M_RELOCK;
          else if (!sync && !reading)   state <= M_NS_SETUP;
          else if (par_err_in && !reading) state <= M_PE_SETUP;
        M_RELOCK:    if (!lock_code) state <= M_IDLE;
        M_NS_SETUP:  state <= M_NS_STROBE;
        M_NS_STROBE: state <= M_NS_WAIT;
        M_NS_WAIT:   if (sync) state <= M_IDLE;
        M_PE_SETUP:  state <= M_PE_STROBE;
        M_PE_STROBE: state <= M_PE_HOLD;
        M_PE_HOLD:   state <= M_IDLE;
        default:     state <= M_IDLE;
      endcase

      if (diag0_code)      la0 <= 1'b1;
      else if (reset_code) la0 <= 1'b0;
      if (diag1_code)      la1 <= 1'b1;
      else if (reset_code) la1 <= 1'b0;
    end
  end

  always_comb begin
    notify     = state inside {M_NS_SETUP, M_NS_STROBE, M_PE_SETUP, M_PE_STROBE, M_PE_HOLD};
    cav        = state inside {M_NS_STROBE, M_PE_STROBE};
    nosync     = state inside {M_NS_SETUP, M_NS_STROBE};
    par_err    = state inside {M_PE_SETUP, M_PE_STROBE};
    relock_rst = (state == M_RELOCK);
    ed         = (state != M_RELOCK);
  end

  assign la      = la0 | la1;
  assign bus_en0 = la0 | bus_en;
  assign bus_en1 = la1 | bus_en;

  // A report strobe is always preceded by its set-up cycle.
  a_cav_after_notify: assert property (@(posedge clk) disable iff (rst) cav |-> $past(notify));
endmodule
