// sync_fsm: control-link framing synchroniser.
//
// The control link is a 53 Mbit/s NRZ stream of back-to-back seven-bit
// packets whose first bit (the framing bit) is always 1.  This machine runs
// on the link clock and has two loops, as the document describes:
//   * the working loop of PKT_LEN states.  Its last state is the one in which
//     the next framing bit is expected; in that state `lat` is high, telling
//     the packet latch that the shift register now holds the six bits that
//     followed the previous framing bit.  If NRZ is 1 at the end of that
//     state the loop repeats, otherwise synchronisation is lost;
//   * the resynchronisation loop: RESYNC_LEN sequential states (time for the
//     loss-of-synch report to reach the readout board and for its string of
//     zeroes to arrive), then a hunt state that stays until NRZ is 1 and takes
//     that 1 as a framing bit.
// `sync` is high in the working loop only.  Reset enters the hunt state, so
// the same sequence serves at power-up.
// The document's bullet list says the machine "waits for a string of sixteen
// zeroes", while its detailed description uses a fixed run of thirty states;
// the fixed run is built.  The state encoding (an enum plus a counter) is this
// design's own.
module sync_fsm #(
  parameter int unsigned PKT_LEN    = 7,
  parameter int unsigned RESYNC_LEN = 30
) (
  input  logic clk,      // 53 MHz link clock
  input  logic rst,      // synchronous, active high
  input  logic nrz,      // link data, sampled on the rising edge
  output logic sync,     // in the working loop
  output logic lat       // framing bit expected this cycle; latch the packet
);
  typedef enum logic [1:0] {HUNT, FRAME, RESYNC} sstate_e;

  localparam int unsigned CW = $clog2(RESYNC_LEN > PKT_LEN ? RESYNC_LEN : PKT_LEN);

  sstate_e        state;
  logic [CW-1:0]  cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= HUNT;
      cnt   <= '0;
    end else begin
      unique case (state)
        HUNT: begin
          cnt <= '0;
          if (nrz) state <= FRAME;
        end
        FRAME: begin
          if (cnt == CW'(PKT_LEN - 1)) begin
            cnt <= '0;
            if (!nrz) state <= RESYNC;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        RESYNC: begin
          if (cnt == CW'(RESYNC_LEN - 1)) begin
            cnt   <= '0;
            state <= HUNT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= HUNT;
      endcase
    end
  end

  assign sync = (state == FRAME);
  assign lat  = (state == FRAME) && (cnt == CW'(PKT_LEN - 1));
endmodule
