// packet_latch_tb: checks that the latch captures the six bits only on `lat`,
// holds them otherwise, and gives `new_pkt` and the crossing pulse `xing`
// exactly in the cycle after a capture.
module packet_latch_tb;
  import pc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, lat = 1'b0;
  logic [5:0] d = '0;
  pkt_t pkt;
  logic new_pkt, xing;
  logic [5:0] held = '0;
  bit   was_lat = 1'b0;
  int   checks = 0, failures = 0;

  packet_latch dut (.clk, .rst, .lat, .d, .pkt, .new_pkt, .xing);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      chk(pkt === pkt_t'(held), "held value");
      chk(new_pkt === was_lat, "new_pkt");
      chk(xing === (was_lat && held[5]), "crossing pulse");
      lat = (n % 7 === 6);
      d   = 6'($urandom);
      @(posedge clk);
      was_lat = lat;
      if (lat) held = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
