// hc_channel_det: per-input-channel circuit of the deterministic switch
// ("Block A" in the switch description).
//
// The comparator xors the packet's immediate destination with the switch id.
// If the result is zero the packet has arrived and is delivered (removed
// from the network). Otherwise the priority encoder picks the smallest
// differing dimension and the router raises the write request of that
// output queue. The packet is passed on unchanged. Combinational; the
// packet comes from the input buffer and the request goes to the queues.
module hc_channel_det #(
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
  output logic [PKT_W-1:0] out_pkt
);
  logic [D-1:0] diff;
  logic         route, found;

  hc_comparator       #(.D(D)) u_cmp (.dest(pkt[D-1:0]), .pid(pid), .diff(diff), .route(route));
  hc_priority_encoder #(.D(D)) u_enc (.vec(diff), .idx(idx), .found(found));
  hc_router           #(.D(D)) u_rtr (.valid(valid && route && found), .idx(idx), .req(req));

  assign deliver = valid && !route;
  assign out_pkt = pkt;
endmodule
