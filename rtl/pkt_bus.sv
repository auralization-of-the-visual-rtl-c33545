// pkt_bus: the word-serial packet bus that links every pair of units.
//
// A sender drives data, start and re; the receiver drives woe.  woe high
// means the receiver has taken what is on the bus and can accept a word.  A
// word moves on every clock where re and woe are both high; re stays high
// across a burst.  start marks the first word of a packet and restarts the
// receiver's packet state machine.  While re is high and woe low the sender
// holds data and start.  Transferring on re && woe (rather than on re alone)
// is this design's reading of the handshake; the assertions below check it.
interface pkt_bus #(parameter int unsigned W = 8) (input logic clk, input logic rst);
  logic         woe;
  logic         re;
  logic         start;
  logic [W-1:0] data;

  modport tx (input woe, output re, start, data);
  modport rx (output woe, input re, start, data);

  // A word offered and not taken stays on the bus unchanged.
  a_hold: assert property (@(posedge clk) disable iff (rst)
    (re && !woe) |=> (re && $stable(data) && $stable(start)))
    else $error("pkt_bus: word changed before it was taken");
endinterface
