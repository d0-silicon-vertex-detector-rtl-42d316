// svx_hdi_model: testbench model of one HDI's string of SVX-II chips during
// readout.  Not synthesizable.
//
// When priority-in is high the chips put one byte on the bus at every edge of their clock (the readout
// clock is 53 MHz / 2, so a byte every 18.8 ns).  After `n_bytes` bytes
// (value = `seed` + index) priority-out goes high until priority-in falls.
// It also counts rising clock edges in each mode for the testbench.
module svx_hdi_model (
  input  logic       svx_clk,
  input  logic       pri_in,
  output logic [7:0] bus,
  output logic       pri_out
);
  int   n_bytes = 8;
  logic [7:0] seed = 8'h10;
  int   sent = 0;
  int   rises = 0;

  initial begin
    bus = '0;
    pri_out = 1'b0;
  end

  always @(posedge svx_clk) rises++;

  always @(svx_clk) begin
    if (pri_in && !pri_out) begin
      if (sent < n_bytes) begin
        bus <= seed + 8'(sent);
        sent <= sent + 1;
      end else begin
        pri_out <= 1'b1;
      end
    end
  end

  always @(negedge pri_in) begin
    pri_out <= 1'b0;
    sent    <= 0;
    bus     <= '0;
  end
endmodule
