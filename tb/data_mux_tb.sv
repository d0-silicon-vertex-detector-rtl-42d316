// data_mux_tb: random test of the output byte selector against its priority
// rule (error report over diagnostic state over control byte).
module data_mux_tb;
  logic [7:0] d, a;
  logic [6:0] state;
  logic notify, la, par_err, nosync;
  int checks = 0, failures = 0;
  int n_err = 0, n_la = 0, n_d = 0;

  data_mux dut (.*);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [7:0] e;
      {d, state, notify, la, par_err, nosync} = {$urandom, $urandom};
      #1;
      if (notify) begin e = 8'b0; e[1] = par_err; e[0] = nosync; n_err++; end
      else if (la) begin e = {1'b0, state}; n_la++; end
      else begin e = d; n_d++; end
      checks++;
      if (a !== e) begin failures++; $display("FAIL a=%h exp %h", a, e); end
    end
    if (n_err === 0 || n_la === 0 || n_d === 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
