// dig_counter_tb: checks that, for several presets, the ripple carry comes
// exactly 255-preset clocks after the enable rises, and that the counter
// reloads while disabled.
module dig_counter_tb;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [7:0] preset = '0, q;
  logic rco_n;
  int   checks = 0, failures = 0;

  dig_counter #(.WIDTH(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    int presets[5] = '{0, 1, 100, 200, 255};
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    foreach (presets[i]) begin
      int n;
      preset = 8'(presets[i]);
      @(negedge clk);
      checks++;
      if (q !== preset || !rco_n) begin failures++; $display("FAIL load %0d", preset); end
      en = 1'b1; n = 0;
      #1;
      while (rco_n && n < 400) begin @(negedge clk); #1; n++; end
      checks++;
      if (n !== 255 - presets[i]) begin
        failures++; $display("FAIL preset %0d: carry after %0d clocks", presets[i], n);
      end
      @(negedge clk) en = 1'b0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
