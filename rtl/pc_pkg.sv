// pc_pkg: types and constants shared by the Port Card Equivalent logic.
//
// The control link carries back-to-back seven-bit packets at 53 Mbit/s
// (one packet per 132 ns beam-crossing slot):
//   bit 0 (first on the wire) framing bit, always 1
//   bit 1                     crossing bit
//   bits 2..5                 control code, most significant bit first
//   bit 6                     parity bit
// The four-bit control code values follow the document's code table.  The
// READ_STATUS value (0100) appears only in the decoder equations of the
// document and has no described function; it is decoded and brought out.
// The parity sense is this design's choice: even parity over the six bits
// after the framing bit.
package pc_pkg;

  // Bits in one control-link packet, framing bit included.
  localparam int unsigned PKT_BITS    = 7;
  // Number of HDI cables (and SVX-II buses) served by one Port Card Equivalent.
  localparam int unsigned HDI_PER_PCE = 4;

  typedef enum logic [3:0] {
    CODE_IDLE        = 4'b0000,
    CODE_ACQ         = 4'b0001,
    CODE_DIG         = 4'b0011,
    CODE_READOUT     = 4'b0010,
    CODE_RESET_PRE   = 4'b0101,
    CODE_RESET       = 4'b0110,
    CODE_DIAG1       = 4'b1011,
    CODE_DIAG0       = 4'b1001,
    CODE_DIG_TP      = 4'b0111,
    CODE_READ_STATUS = 4'b0100,
    CODE_PWR_UP      = 4'b1100,
    CODE_GLINK_LOCK  = 4'b1111
  } ctrl_code_e;

  // One line per control code, as produced by the code decoder.
  typedef struct packed {
    logic idle;
    logic acq;
    logic dig;
    logic readout;
    logic reset_pre;
    logic reset;
    logic diag1;
    logic diag0;
    logic dig_tp;
    logic read_status;
    logic pwr_up;
    logic glink_lock;
  } ctrl_lines_t;

  // Contents of the packet latch (hex D flip-flop).
  typedef struct packed {
    logic       crossing;
    logic [3:0] code;
    logic       parity;
  } pkt_t;

  // Even parity bit that makes crossing, code and parity XOR to zero.
  function automatic logic pkt_parity(logic crossing, logic [3:0] code);
    return crossing ^ (^code);
  endfunction

endpackage
