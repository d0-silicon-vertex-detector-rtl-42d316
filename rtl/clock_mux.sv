// clock_mux: selects the clock sent to each HDI's SVX-II chips.
//
// Sources, as the document lists them per mode:
//   acquisition    one 53 MHz pulse per crossing (`enacro` and `xing`);
//   pipeline readout single pulses requested by the main machine (`smclk`);
//   digitization   the 53 MHz clock itself (`ena53`);
//   readout        the 53 MHz clock divided by two (`ena26`);
//   download       each HDI's download clock from the download interface
//                  (`dnld_sel`), which is the VME DTACK.
// Gating is this design's own: the 53 MHz enables are sampled on the falling
// clock edge and ANDed with the clock, so every gated pulse is a full high
// phase that starts at a rising edge one cycle after the request.  The divide
// by two is a toggle flip-flop that runs only while `ena26` is high and
// starts low.  All HDIs get the same clock except in download.
module clock_mux #(
  parameter int unsigned N_HDI = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enacro,
  input  logic             xing,
  input  logic             smclk,
  input  logic             ena53,
  input  logic             ena26,
  input  logic             dnld_sel,
  input  logic [N_HDI-1:0] dnld_clk,
  output logic [N_HDI-1:0] svx_clk
);
  logic gate_n;   // enable sampled on the falling edge
  logic div2;

  always_ff @(negedge clk) begin
    if (rst) gate_n <= 1'b0;
    else     gate_n <= ena53 | smclk | (enacro & xing);
  end

  always_ff @(posedge clk) begin
    if (rst || !ena26) div2 <= 1'b0;
    else               div2 <= ~div2;
  end

  logic gated;
  assign gated = (clk & gate_n) | div2;

  always_comb begin
    for (int i = 0; i < N_HDI; i++)
      svx_clk[i] = dnld_sel ? dnld_clk[i] : gated;
  end
endmodule
