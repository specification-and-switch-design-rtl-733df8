// hc_switch: one single switch (SS) of the hypercube routing network.
//
// A switch of a D-dimensional hypercube has D incoming and D outgoing
// channels; channel d connects to the neighbour whose id differs in bit d.
// Each incoming channel has a one-packet input buffer followed by a channel
// circuit that either delivers the packet to the local processor (it has
// arrived) or requests one of the D output queues. The local processor
// injects through an extra, (D+1)-th, input buffer with its own channel
// circuit. All input buffers are served in the same cycle; each output queue
// accepts every request it has room for, and a refused packet waits in its
// input buffer. Every output queue drives its outgoing channel with a
// valid/ready handshake, one packet per cycle.
//
// VARIANT selects the channel circuit: VAR_DET (deterministic bit-fixing),
// VAR_RAND1 (destination exchange in front of the deterministic circuit; the
// intermediate destination is drawn from a random generator when the packet
// is injected), VAR_RAND2 (random dimension choice with a mask). OOO = 1
// lets first-phase packets overtake second-phase ones in the output queues.
// SHARED_RNG = 1 makes each VAR_RAND2 channel draw both of its random values
// from one generator instead of two.
//
// Timing: a packet loaded into an input buffer at one clock edge is written
// into an output queue at the next and can be in the neighbour's input
// buffer one edge later, so a hop takes two cycles when there is no
// contention. Delivery (dlv_valid) is a one-cycle strobe while the packet
// sits in its input buffer; the processor must take it (packets that reach
// their destination leave the network).
//
// The injection port, the back-pressure when an output queue is full and the
// random generators are this design's additions; the channel circuits,
// buffers and queues are those the document describes.
module hc_switch
  import hc_pkg::*;
#(
  parameter int          D       = 4,
  parameter int          W       = 8,
  parameter int          DATA_W  = 8,
  parameter variant_e    VARIANT = VAR_DET,
  parameter bit          OOO     = 1'b0,
  parameter logic [31:0] SEED    = 32'h1,
  parameter bit          SHARED_RNG = 1'b0,
  localparam int PKT_W = pkt_w(D, DATA_W),
  localparam int NIN   = D + 1,
  localparam int IW    = (D > 1) ? $clog2(D) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [D-1:0]              pid,
  // incoming channels
  input  logic [D-1:0]              in_valid,
  input  logic [D-1:0][PKT_W-1:0]   in_pkt,
  output logic [D-1:0]              in_ready,
  // outgoing channels
  output logic [D-1:0]              out_valid,
  output logic [D-1:0][PKT_W-1:0]   out_pkt,
  input  logic [D-1:0]              out_ready,
  // local processor: injection
  input  logic                      inj_valid,
  input  logic [D-1:0]              inj_fdest,
  input  logic [DATA_W-1:0]         inj_data,
  output logic                      inj_ready,
  // local processor: delivery, one strobe per input buffer
  output logic [NIN-1:0]            dlv_valid,
  output logic [NIN-1:0][PKT_W-1:0] dlv_pkt,
  // events of this cycle
  output logic                      ev_exchange,  // RAND1: destination exchanged
  output logic                      ev_forced,    // RAND2: packet forced to a random neighbour
  output logic                      ev_reorder,   // OOO: a queue passed over its oldest packet
  output logic                      ev_conflict,  // two packets chose one output queue
  output logic                      ev_stall      // a packet was refused by a full queue
);
  logic [NIN-1:0]            b_in_valid, b_in_ready, b_valid, consume;
  logic [NIN-1:0][PKT_W-1:0] b_in_pkt, b_pkt, c_pkt;
  logic [NIN-1:0][D-1:0]     c_req;
  logic [NIN-1:0]            c_deliver, c_prio, c_xchg, c_forced;
  logic [D-1:0][NIN-1:0]     q_wr_valid, q_grant;
  logic [D-1:0]              q_reorder;
  logic [D-1:0]              inj_idest;
  logic [PKT_W-1:0]          inj_pkt;

  // Random intermediate destination of an injected packet (first variant).
  if (VARIANT == VAR_RAND1) begin : g_idest_rng
    hc_rng #(.OUT_W(D), .SEED(SEED ^ 32'h5BD1E995)) u_rng (.clk(clk), .rst_n(rst_n), .rnd(inj_idest));
  end else begin : g_idest_final
    assign inj_idest = inj_fdest;
  end

  // Packet as it enters the network.
  always_comb begin
    inj_pkt                        = '0;
    inj_pkt[D-1:0]                 = inj_idest;
    inj_pkt[2*D-1:D]               = inj_fdest;
    inj_pkt[3*D:2*D]               = (VARIANT == VAR_RAND2) ? {1'b0, {D{1'b1}}} : '0;
    inj_pkt[PKT_W-1:3*D+1]         = inj_data;
  end

  always_comb begin
    b_in_valid = {inj_valid, in_valid};
    b_in_pkt   = {inj_pkt, in_pkt};
    in_ready   = b_in_ready[D-1:0];
    inj_ready  = b_in_ready[D];
  end

  for (genvar p = 0; p < NIN; p++) begin : g_in
    logic [IW-1:0] c_idx;

    hc_packet_buffer #(.PKT_W(PKT_W)) u_buf (
      .clk(clk), .rst_n(rst_n), .in_valid(b_in_valid[p]), .in_pkt(b_in_pkt[p]),
      .in_ready(b_in_ready[p]), .valid(b_valid[p]), .pkt(b_pkt[p]), .consume(consume[p]));

    if (VARIANT == VAR_DET) begin : g_det
      hc_channel_det #(.D(D), .DATA_W(DATA_W)) u_ch (
        .pid(pid), .valid(b_valid[p]), .pkt(b_pkt[p]), .deliver(c_deliver[p]), .req(c_req[p]),
        .idx(c_idx), .out_pkt(c_pkt[p]));
      assign c_prio[p]   = 1'b0;
      assign c_xchg[p]   = 1'b0;
      assign c_forced[p] = 1'b0;
    end else if (VARIANT == VAR_RAND1) begin : g_rand1
      hc_channel_rand1 #(.D(D), .DATA_W(DATA_W)) u_ch (
        .pid(pid), .valid(b_valid[p]), .pkt(b_pkt[p]), .deliver(c_deliver[p]), .req(c_req[p]),
        .idx(c_idx), .out_pkt(c_pkt[p]), .prio(c_prio[p]), .exchanged(c_xchg[p]));
      assign c_forced[p] = 1'b0;
    end else begin : g_rand2
      hc_channel_rand2 #(.D(D), .DATA_W(DATA_W), .SEED(SEED + 32'(p) * 32'h01000193),
                         .SHARED_RNG(SHARED_RNG)) u_ch (
        .clk(clk), .rst_n(rst_n), .pid(pid), .valid(b_valid[p]), .pkt(b_pkt[p]),
        .deliver(c_deliver[p]), .req(c_req[p]), .idx(c_idx), .out_pkt(c_pkt[p]),
        .prio(c_prio[p]), .forced(c_forced[p]));
      assign c_xchg[p] = 1'b0;
    end

    assign dlv_valid[p] = c_deliver[p];
    assign dlv_pkt[p]   = b_pkt[p];
  end

  for (genvar d = 0; d < D; d++) begin : g_q
    for (genvar p = 0; p < NIN; p++) begin : g_wr
      assign q_wr_valid[d][p] = c_req[p][d];
    end
    hc_output_queue #(.PKT_W(PKT_W), .W(W), .NWR(NIN), .OOO(OOO)) u_q (
      .clk(clk), .rst_n(rst_n), .wr_valid(q_wr_valid[d]), .wr_data(c_pkt), .wr_prio(c_prio),
      .wr_grant(q_grant[d]), .rd_valid(out_valid[d]), .rd_data(out_pkt[d]), .rd_prio(),
      .rd_ready(out_ready[d]), .count(), .reordered(q_reorder[d]));
  end

  always_comb begin
    for (int p = 0; p < NIN; p++) begin
      consume[p] = c_deliver[p];
      for (int d = 0; d < D; d++)
        if (q_grant[d][p]) consume[p] = 1'b1;
    end
  end

  always_comb begin
    ev_conflict = 1'b0;
    ev_stall    = 1'b0;
    for (int d = 0; d < D; d++) begin
      if ((q_wr_valid[d] & (q_wr_valid[d] - 1'b1)) != '0) ev_conflict = 1'b1;
      if (|(q_wr_valid[d] & ~q_grant[d])) ev_stall    = 1'b1;
    end
    ev_exchange = |c_xchg;
    ev_forced   = |c_forced;
    ev_reorder  = |q_reorder;
  end
endmodule
