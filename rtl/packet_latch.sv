// packet_latch: the "hex D flip-flop" that holds the current packet.
//
// On a clock edge where `lat` is high it registers the six bits after the
// framing bit from the shift register and holds them for the following
// packet time (seven link clocks, 132 ns).  `new_pkt` is high for the one
// cycle after a capture; `xing` is high in that same cycle when the crossing
// bit of the new packet is set.  That one-cycle pulse is the output of the
// crossing circuit, which the clock multiplexer passes to the SVX-II clock
// during acquisition.  The document names the latch and the crossing
// circuit; the pulse timing and the reset value (IDLE code, crossing clear)
// are this design's choices.
module packet_latch
  import pc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       lat,
  input  logic [5:0] d,        // shift register bits 5..0
  output pkt_t       pkt,
  output logic       new_pkt,
  output logic       xing
);
  always_ff @(posedge clk) begin
    if (rst) begin
      pkt     <= '0;
      new_pkt <= 1'b0;
    end else begin
      new_pkt <= lat;
      if (lat) pkt <= pkt_t'(d);
    end
  end

  assign xing = new_pkt & pkt.crossing;
endmodule
