// hypercube_top: the three switch designs of the hypercube routing network,
// each as a complete network of N = 2^D switches, side by side.
//
//   det_*  deterministic bit-fixing switches (Det-R)
//   r1_*   first randomized variant: random intermediate destination drawn
//          at injection, destination exchange on arrival there
//          (Rand-Trans, or Rand-Trans-OOO with RAND1_OOO = 1)
//   r2_*   second randomized variant: random per-dimension decisions under a
//          mask, forced hop when none is taken (DRand-Trans-OOO with
//          RAND2_OOO = 1); RAND2_SHARED_RNG = 1 draws each channel's two
//          random values from one generator instead of two
//
// Each network has its own processor ports: inj_* to inject a packet at a
// switch (valid/ready; the packet holds a final destination and a payload)
// and dlv_* where switch s presents, for one cycle, each packet that has
// arrived in one of its D+1 input buffers. The networks share clock and
// reset (asynchronous, active low) and nothing else. ev_* report per switch
// the events of the current cycle. Defaults: 16 switches (D = 4), output
// queues of 8 packets, 8-bit payload; the queue depth and payload width are
// this design's choice.
module hypercube_top
  import hc_pkg::*;
#(
  parameter int D         = 4,
  parameter int W         = 8,
  parameter int DATA_W    = 8,
  parameter bit RAND1_OOO = 1'b0,
  parameter bit RAND2_OOO = 1'b1,
  parameter bit RAND2_SHARED_RNG = 1'b0,
  localparam int N     = 1 << D,
  localparam int PKT_W = pkt_w(D, DATA_W),
  localparam int NIN   = D + 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // deterministic network
  input  logic [N-1:0]                     det_inj_valid,
  input  logic [N-1:0][D-1:0]              det_inj_fdest,
  input  logic [N-1:0][DATA_W-1:0]         det_inj_data,
  output logic [N-1:0]                     det_inj_ready,
  output logic [N-1:0][NIN-1:0]            det_dlv_valid,
  output logic [N-1:0][NIN-1:0][PKT_W-1:0] det_dlv_pkt,
  output logic [N-1:0]                     det_ev_conflict,
  output logic [N-1:0]                     det_ev_stall,
  // first randomized network
  input  logic [N-1:0]                     r1_inj_valid,
  input  logic [N-1:0][D-1:0]              r1_inj_fdest,
  input  logic [N-1:0][DATA_W-1:0]         r1_inj_data,
  output logic [N-1:0]                     r1_inj_ready,
  output logic [N-1:0][NIN-1:0]            r1_dlv_valid,
  output logic [N-1:0][NIN-1:0][PKT_W-1:0] r1_dlv_pkt,
  output logic [N-1:0]                     r1_ev_exchange,
  output logic [N-1:0]                     r1_ev_reorder,
  output logic [N-1:0]                     r1_ev_conflict,
  output logic [N-1:0]                     r1_ev_stall,
  // second randomized network
  input  logic [N-1:0]                     r2_inj_valid,
  input  logic [N-1:0][D-1:0]              r2_inj_fdest,
  input  logic [N-1:0][DATA_W-1:0]         r2_inj_data,
  output logic [N-1:0]                     r2_inj_ready,
  output logic [N-1:0][NIN-1:0]            r2_dlv_valid,
  output logic [N-1:0][NIN-1:0][PKT_W-1:0] r2_dlv_pkt,
  output logic [N-1:0]                     r2_ev_forced,
  output logic [N-1:0]                     r2_ev_reorder,
  output logic [N-1:0]                     r2_ev_conflict,
  output logic [N-1:0]                     r2_ev_stall
);
  hc_network #(.D(D), .W(W), .DATA_W(DATA_W), .VARIANT(VAR_DET), .OOO(1'b0)) u_det (
    .clk(clk), .rst_n(rst_n),
    .inj_valid(det_inj_valid), .inj_fdest(det_inj_fdest), .inj_data(det_inj_data),
    .inj_ready(det_inj_ready), .dlv_valid(det_dlv_valid), .dlv_pkt(det_dlv_pkt),
    .ev_exchange(), .ev_forced(), .ev_reorder(),
    .ev_conflict(det_ev_conflict), .ev_stall(det_ev_stall));

  hc_network #(.D(D), .W(W), .DATA_W(DATA_W), .VARIANT(VAR_RAND1), .OOO(RAND1_OOO)) u_rand1 (
    .clk(clk), .rst_n(rst_n),
    .inj_valid(r1_inj_valid), .inj_fdest(r1_inj_fdest), .inj_data(r1_inj_data),
    .inj_ready(r1_inj_ready), .dlv_valid(r1_dlv_valid), .dlv_pkt(r1_dlv_pkt),
    .ev_exchange(r1_ev_exchange), .ev_forced(), .ev_reorder(r1_ev_reorder),
    .ev_conflict(r1_ev_conflict), .ev_stall(r1_ev_stall));

  hc_network #(.D(D), .W(W), .DATA_W(DATA_W), .VARIANT(VAR_RAND2), .OOO(RAND2_OOO),
               .SHARED_RNG(RAND2_SHARED_RNG)) u_rand2 (
    .clk(clk), .rst_n(rst_n),
    .inj_valid(r2_inj_valid), .inj_fdest(r2_inj_fdest), .inj_data(r2_inj_data),
    .inj_ready(r2_inj_ready), .dlv_valid(r2_dlv_valid), .dlv_pkt(r2_dlv_pkt),
    .ev_exchange(), .ev_forced(r2_ev_forced), .ev_reorder(r2_ev_reorder),
    .ev_conflict(r2_ev_conflict), .ev_stall(r2_ev_stall));
endmodule
