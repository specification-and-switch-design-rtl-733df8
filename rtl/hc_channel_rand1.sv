// hc_channel_rand1: per-input-channel circuit of the first randomized switch.
//
// The packet carries an intermediate destination (chosen at random when it
// entered the network) as its immediate destination, and its final
// destination. The destination exchange replaces the immediate destination
// with the final one once the packet stands at its intermediate destination;
// the rest is the deterministic circuit (hc_channel_det) acting on the new
// immediate destination. The packet leaves with the exchanged destination
// written into it. `prio` marks a packet still in its first phase
// (immediate and final destinations differ) for an out-of-order queue.
// Combinational.
module hc_channel_rand1 #(
  parameter int D      = 4,
  parameter int DATA_W = 8,
  localparam int PKT_W = hc_pkg::pkt_w(D, DATA_W),
  localparam int IW    = (D > 1) ? $clog2(D) : 1
) (
  input  logic [D-1:0]     pid,
  input  logic             valid,
  input  logic [PKT_W-1:0] pkt,
  output logic             deliver,
  output logic [D-1:0]     req,
  output logic [IW-1:0]    idx,
  output logic [PKT_W-1:0] out_pkt,
  output logic             prio,
  output logic             exchanged
);
  logic [D-1:0]     dest;
  logic [PKT_W-1:0] xpkt;
  logic             xchg;

  hc_dest_exchange #(.D(D)) u_xchg (
    .idest(pkt[D-1:0]), .fdest(pkt[2*D-1:D]), .pid(pid), .dest(dest), .exchanged(xchg));

  always_comb begin
    xpkt          = pkt;
    xpkt[D-1:0]   = dest;
  end

  hc_channel_det #(.D(D), .DATA_W(DATA_W)) u_blk_a (
    .pid(pid), .valid(valid), .pkt(xpkt), .deliver(deliver), .req(req), .idx(idx),
    .out_pkt(out_pkt));

  assign prio      = (out_pkt[D-1:0] != out_pkt[2*D-1:D]);
  assign exchanged = valid && xchg;
endmodule
