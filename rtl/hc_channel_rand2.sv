// hc_channel_rand2: per-input-channel circuit of the second randomized switch.
//
// The packet carries its final destination and a mask: the set T of
// dimensions it may still use in the first phase plus an "all fixed" flag.
// First phase (flag clear): the random destination generator supplies a
// random id; xored with the switch id it gives an independent random
// route/do-not-route decision for every dimension. The dimension selector
// takes the smallest dimension in T whose decision is "route". If there is
// none, the alternate destination selector sends the packet to a random
// neighbour (second random source) and the mask is emptied. The mask
// generator writes the new mask into the packet. Second phase (flag set):
// the final destination is compared with the switch id and the packet is
// routed deterministically, smallest differing dimension first, or
// delivered when they match. `prio` marks a packet that leaves still in
// its first phase. The random sources advance every cycle; the rest is
// combinational.
//
// SHARED_RNG = 0 gives each use its own generator (random destination
// generator and random bit string generator). SHARED_RNG = 1 takes both
// from one wider generator, the saving the document suggests: its low D
// bits are the random id and the next bits pick the forced neighbour.
module hc_channel_rand2 #(
  parameter int          D      = 4,
  parameter int          DATA_W = 8,
  parameter logic [31:0] SEED   = 32'h1,
  parameter bit          SHARED_RNG = 1'b0,
  localparam int PKT_W = hc_pkg::pkt_w(D, DATA_W),
  localparam int IW    = (D > 1) ? $clog2(D) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [D-1:0]     pid,
  input  logic             valid,
  input  logic [PKT_W-1:0] pkt,
  output logic             deliver,
  output logic [D-1:0]     req,
  output logic [IW-1:0]    idx,
  output logic [PKT_W-1:0] out_pkt,
  output logic             prio,
  output logic             forced
);
  logic [D-1:0]  rdest, fdest, dest, diff, allow;
  logic [IW-1:0] rbits, sel_idx, alt_idx;
  logic [D:0]    mask, new_mask;
  logic          fixed, route, found, alt_forced;

  assign fdest = pkt[2*D-1:D];
  assign mask  = pkt[3*D:2*D];
  assign fixed = mask[D];

  if (SHARED_RNG) begin : g_one_rng
    logic [D+IW-1:0] rnd;
    hc_rng #(.OUT_W(D + IW), .SEED(SEED)) u_rng (.clk(clk), .rst_n(rst_n), .rnd(rnd));
    assign rdest = rnd[D-1:0];
    assign rbits = rnd[D+IW-1:D];
  end else begin : g_two_rng
    hc_rng #(.OUT_W(D),  .SEED(SEED))                u_rdest (.clk(clk), .rst_n(rst_n), .rnd(rdest));
    hc_rng #(.OUT_W(IW), .SEED(SEED ^ 32'h9E3779B9)) u_rbits (.clk(clk), .rst_n(rst_n), .rnd(rbits));
  end

  // Destination mux: random id in the first phase, final id in the second.
  assign dest  = fixed ? fdest : rdest;
  assign allow = fixed ? {D{1'b1}} : mask[D-1:0];

  hc_comparator #(.D(D)) u_cmp (.dest(dest), .pid(pid), .diff(diff), .route(route));
  hc_dim_select #(.D(D)) u_dsel (.decide(diff), .mask(allow), .idx(sel_idx), .found(found));
  hc_alt_select #(.D(D)) u_alt (.rnd(rbits), .found(found || fixed), .sel_idx(sel_idx),
                                .idx(alt_idx), .forced(alt_forced));
  hc_mask_gen   #(.D(D)) u_mgen (.mask_in(mask), .idx(alt_idx), .forced(alt_forced),
                                 .mask_out(new_mask));

  assign idx     = alt_idx;
  assign deliver = valid && fixed && !route;
  assign forced  = valid && alt_forced;

  hc_router #(.D(D)) u_rtr (.valid(valid && !deliver), .idx(idx), .req(req));

  always_comb begin
    out_pkt           = pkt;
    out_pkt[3*D:2*D]  = fixed ? mask : new_mask;
    prio              = !out_pkt[3*D];
  end
endmodule
