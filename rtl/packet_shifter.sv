// packet_shifter: seven-bit serial-to-parallel shift register.
//
// Shifts the NRZ control-link bit into bit 0 on every link-clock edge, so
// that q[WIDTH-1] holds the oldest bit.  When the synchroniser reports that
// the next framing bit is due, q[6] is the last framing bit, q[5] the
// crossing bit, q[4:1] the control code (MSB first on the wire) and q[0] the
// parity bit.  Follows the document's "seven bit shift register"; reset to
// zero is this design's choice.
module packet_shifter #(
  parameter int unsigned WIDTH = 7
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             nrz,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= {q[WIDTH-2:0], nrz};
  end
endmodule
