// packet_shifter_tb: checks that the shift register always holds the last
// seven NRZ bits, newest in bit 0, against a queue kept by the testbench.
module packet_shifter_tb;
  logic clk = 1'b0, rst = 1'b1, nrz = 1'b0;
  logic [6:0] q;
  bit   hist[$];
  int   checks = 0, failures = 0;

  packet_shifter #(.WIDTH(7)) dut (.clk, .rst, .nrz, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 7; i++) hist.push_back(1'b0);
    for (int n = 0; n < 200; n++) begin
      @(negedge clk) nrz = 1'($urandom);
      @(posedge clk) #1;
      hist.push_back(nrz);
      hist.pop_front();
      for (int k = 0; k < 7; k++) begin
        checks++;
        if (q[k] !== hist[6 - k]) begin
          failures++;
          $display("FAIL bit %0d at step %0d", k, n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
