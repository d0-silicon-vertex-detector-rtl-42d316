// hdi_bus_switch: the bus buffers between the EPLD, the HDI cables and the
// G-Link inputs.
//
// Each HDI has an eight-bit bus.  Outside readout the EPLD drives it (through
// a tri-state buffer and a Futurebus transceiver) with the control byte `a`;
// during readout the buffer is off and the SVX-II chips drive the bus.  Each
// G-Link transmitter takes the buses of two neighbouring HDIs as its 16-bit
// input (HDI 2k in the low byte, HDI 2k+1 in the high byte).  One enable
// serves each HDI pair, so diagnostic mode can keep one pair driven while
// the other reads out.  The resolved bus value is modelled as a multiplexer:
// `hdi_bus` is what is on each bus, `hdi_drv_en` whether the Port Card drives
// it.  The pairing of HDIs to G-Links follows the document; the byte order
// in the G-Link word is this design's choice.
module hdi_bus_switch #(
  parameter int unsigned N_HDI = 4
) (
  input  logic [7:0]            a,
  input  logic [N_HDI/2-1:0]    pair_en,
  input  logic [N_HDI-1:0][7:0] svx_bus,
  output logic [N_HDI-1:0][7:0] hdi_bus,
  output logic [N_HDI-1:0]      hdi_drv_en,
  output logic [N_HDI/2-1:0][15:0] glink_d
);
  always_comb begin
    for (int i = 0; i < N_HDI; i++) begin
      hdi_drv_en[i] = pair_en[i/2];
      hdi_bus[i]    = pair_en[i/2] ? a : svx_bus[i];
    end
    for (int k = 0; k < N_HDI/2; k++)
      glink_d[k] = {hdi_bus[2*k+1], hdi_bus[2*k]};
  end
endmodule
