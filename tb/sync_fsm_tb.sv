// sync_fsm_tb: self-checking test of the framing synchroniser.
//
// Drives the NRZ line on falling clock edges and checks `sync` and `lat`
// before each rising edge against the position of each bit in the stream:
// hunting after reset, locking on the first 1, one `lat` per seven bits just
// before each framing bit, loss of lock on a missing framing bit, a
// resynchronisation run of exactly RESYNC_LEN clocks in which a 1 is ignored,
// and relock on the first 1 after it.
module sync_fsm_tb;
  localparam int PKT = 7, RS = 30;
  logic clk = 1'b0, rst = 1'b1, nrz = 1'b0;
  logic sync, lat;
  int   checks = 0, failures = 0;

  sync_fsm #(.PKT_LEN(PKT), .RESYNC_LEN(RS)) dut (.clk, .rst, .nrz, .sync, .lat);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Present one bit for one clock; check the outputs seen during that bit.
  task automatic send(input bit b, input bit exp_lat, input bit exp_sync);
    @(negedge clk);
    nrz = b;
    #1;
    chk(lat === exp_lat, $sformatf("lat=%0b exp %0b", lat, exp_lat));
    chk(sync === exp_sync, $sformatf("sync=%0b exp %0b", sync, exp_sync));
  endtask

  // A packet: framing bit then six random bits.
  task automatic packet(input bit first);
    send(1'b1, !first, !first);
    repeat (PKT - 1) send(1'($urandom), 1'b0, 1'b1);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (3) send(1'b0, 1'b0, 1'b0);      // hunting
    packet(1'b1);
    repeat (9) packet(1'b0);
    // Missing framing bit.
    send(1'b0, 1'b1, 1'b1);
    // Resynchronisation: RS states; a 1 in the last of them must be ignored.
    for (int i = 0; i < RS; i++) send(i == RS - 1, 1'b0, 1'b0);
    // Hunt state: zeros are waited out, then the next 1 is a framing bit.
    repeat (4) send(1'b0, 1'b0, 1'b0);
    packet(1'b1);
    repeat (5) packet(1'b0);
    send(1'b1, 1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
