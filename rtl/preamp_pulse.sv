// preamp_pulse: pulse former for the SVX-II preamp reset.
//
// While the main state machine is in its preamp reset loop (`prst_req`), the
// reset line (bit 0 of the HDI control byte) is not simply held for the
// length of the loop: its width is set by an external programmable delay
// line.  `dly_drive` sends the request into the delay line and `dly_ret` is
// the delayed copy; the reset line is high from the start of the request
// until the delayed copy arrives, so its width equals the programmed delay
// (as long as that is shorter than the loop).  Outside the loop bit 0 passes
// through unchanged.  The document gives the purpose and the external delay
// line; this AND-with-delayed-copy form is this design's choice.
// Combinational.
module preamp_pulse (
  input  logic prst_req,
  input  logic d0,        // bit 0 of the control byte from the main machine
  input  logic dly_ret,   // delayed copy of dly_drive
  output logic dly_drive,
  output logic d0_out
);
  always_comb begin
    dly_drive = prst_req;
    d0_out    = prst_req ? ~dly_ret : d0;
  end
endmodule
