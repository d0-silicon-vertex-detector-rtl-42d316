// dig_counter: the Port Card's divide-by-256 digitization counter.
//
// While `en` is low it is loaded with `preset`; while `en` is high it counts
// up once per 53 MHz clock, the same clock the SVX-II chips receive during
// digitization.  `rco_n` (ripple carry, active low) goes low while counting
// and at the final count 2**WIDTH-1, which ends digitization after
// 2**WIDTH-1-preset counted clocks.  The document gives the divide-by-256
// size, the enable and the settable end value; making it settable through a
// parallel load is this design's choice.
module dig_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] preset,
  output logic [WIDTH-1:0] q,
  output logic             rco_n
);
  always_ff @(posedge clk) begin
    if (rst || !en) q <= preset;
    else            q <= q + 1'b1;
  end

  assign rco_n = !(en && (&q));
endmodule
