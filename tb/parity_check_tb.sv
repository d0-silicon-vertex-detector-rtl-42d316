// parity_check_tb: exhaustive check of the parity checker over all 64
// latched packets, with and without the new-packet qualifier.  The expected
// result counts the ones in the packet independently of the design.
module parity_check_tb;
  import pc_pkg::*;
  pkt_t pkt;
  logic new_pkt, err;
  int   checks = 0, failures = 0;

  parity_check dut (.pkt, .new_pkt, .err);

  initial begin
    for (int v = 0; v < 64; v++) begin
      for (int q = 0; q < 2; q++) begin
        int ones;
        pkt = pkt_t'(v[5:0]);
        new_pkt = q[0];
        #1;
        ones = $countones(v[5:0]);
        checks++;
        if (err !== (q === 1 && ones % 2 === 1)) begin
          failures++;
          $display("FAIL packet %02h new_pkt %0d err %0b", v, q, err);
        end
      end
    end
    // The package helper must produce a packet that passes.
    for (int c = 0; c < 32; c++) begin
      pkt.crossing = c[4];
      pkt.code     = c[3:0];
      pkt.parity   = pkt_parity(c[4], c[3:0]);
      new_pkt = 1'b1;
      #1;
      checks++;
      if (err) begin failures++; $display("FAIL helper parity %0d", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
