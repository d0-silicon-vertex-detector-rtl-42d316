// parity_check: parity checker for received control packets.
//
// The packet's last bit is a parity bit.  The document does not state the
// parity sense; this design uses even parity over the six bits after the
// framing bit (crossing, four code bits, parity).  `err` is a one-cycle
// pulse in the cycle after the packet was latched (`new_pkt`) when the
// check fails, which is what the master state machine samples.
module parity_check
  import pc_pkg::*;
(
  input  pkt_t pkt,
  input  logic new_pkt,
  output logic err
);
  always_comb err = new_pkt & (^{pkt.crossing, pkt.code, pkt.parity});
endmodule
