// sar_link_model: testbench model of the control-link sender (the readout
// board side).  Not synthesizable.
//
// Emits one bit per link clock on `nrz`, changing on the falling edge.
// Packets are queued with tasks; when the queue is empty it sends IDLE
// packets.  The crossing bit is set in one packet of every `xing_every`
// (1 for 132 ns bunch spacing, 3 for 395 ns).  Packet format: framing 1,
// crossing, code MSB first, even parity over crossing, code and parity.
module sar_link_model (
  input  logic clk,
  output logic nrz
);
  import pc_pkg::*;
  bit q[$];
  int xing_every = 1;
  int pkt_count  = 0;
  int crossings  = 0;

  function automatic bit next_xing();
    bit x = (pkt_count % xing_every) == 0;
    pkt_count++;
    if (x) crossings++;
    return x;
  endfunction

  function automatic void push_packet(input logic [3:0] code, input bit bad_parity, input bit no_frame);
    bit x = next_xing();
    q.push_back(!no_frame);
    q.push_back(x);
    for (int i = 3; i >= 0; i--) q.push_back(code[i]);
    q.push_back(pkt_parity(x, code) ^ bad_parity);
  endfunction

  task automatic send(input logic [3:0] code, input int n = 1);
    repeat (n) push_packet(code, 1'b0, 1'b0);
  endtask
  task automatic send_bad_parity(input logic [3:0] code);
    push_packet(code, 1'b1, 1'b0);
  endtask
  task automatic send_no_frame(input logic [3:0] code);
    push_packet(code, 1'b0, 1'b1);
  endtask
  task automatic send_zeros(input int n);
    repeat (n) q.push_back(1'b0);
  endtask
  task automatic drain();
    while (q.size() > 0) @(posedge clk);
  endtask

  initial nrz = 1'b0;
  always @(negedge clk) begin
    if (q.size() == 0) push_packet(CODE_IDLE, 1'b0, 1'b0);
    nrz <= q.pop_front();
  end
endmodule
