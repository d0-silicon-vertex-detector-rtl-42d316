// hdi_bus_switch_tb: random test of the bus buffers: who drives each HDI
// bus, and how the buses are packed into the two G-Link words.
module hdi_bus_switch_tb;
  localparam int N = 4;
  logic [7:0] a;
  logic [N/2-1:0] pair_en;
  logic [N-1:0][7:0] svx_bus, hdi_bus;
  logic [N-1:0] hdi_drv_en;
  logic [N/2-1:0][15:0] glink_d;
  int checks = 0, failures = 0;

  hdi_bus_switch #(.N_HDI(N)) dut (.*);

  initial begin
    for (int i = 0; i < 500; i++) begin
      a = 8'($urandom); pair_en = 2'($urandom); svx_bus = 32'($urandom);
      #1;
      for (int h = 0; h < N; h++) begin
        automatic logic [7:0] e = pair_en[h / 2] ? a : svx_bus[h];
        checks++;
        if (hdi_bus[h] !== e || hdi_drv_en[h] !== pair_en[h / 2]) begin
          failures++; $display("FAIL hdi %0d", h);
        end
      end
      checks++;
      if (glink_d[0] !== {hdi_bus[1], hdi_bus[0]} || glink_d[1] !== {hdi_bus[3], hdi_bus[2]}) begin
        failures++; $display("FAIL glink packing");
      end
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
