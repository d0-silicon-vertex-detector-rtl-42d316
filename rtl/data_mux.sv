// data_mux: selects the byte the EPLD drives towards the HDIs and G-Links.
//
// Three sources, highest priority first, as in the document:
//   notify  error report for the readout board: bit 1 = parity error,
//           bit 0 = loss of synch, all other bits 0;
//   la      diagnostic mode: bit 7 = 0, bits 6..0 = main state machine state,
//           so the state can be followed remotely like a logic analyser;
//   else    the main state machine's HDI control byte, which also carries the
//           Port Card ID bytes at the start of readout.
// Combinational.
module data_mux (
  input  logic [7:0] d,
  input  logic [6:0] state,
  input  logic       notify,
  input  logic       la,
  input  logic       par_err,
  input  logic       nosync,
  output logic [7:0] a
);
  always_comb begin
    if (notify)  a = {6'b0, par_err, nosync};
    else if (la) a = {1'b0, state};
    else         a = d;
  end
endmodule
