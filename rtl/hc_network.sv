// hc_network: hypercube routing network of N = 2^D single switches (MS).
//
// Switch s has processor id s. Outgoing channel d of switch s is wired to
// incoming channel d of switch s ^ 2^d (the two ids differ in exactly that
// bit), with valid/ready flow control; links are plain wires, so a hop
// costs the two register stages of the switch. The processors sit outside:
// each injects through inj_* and receives delivered packets on dlv_*. All
// switches use the same VARIANT, OOO and SHARED_RNG; each gets its own
// random seed.
// Event outputs report, per switch, what happened in the current cycle.
module hc_network
  import hc_pkg::*;
#(
  parameter int       D       = 4,
  parameter int       W       = 8,
  parameter int       DATA_W  = 8,
  parameter variant_e VARIANT = VAR_DET,
  parameter bit       OOO     = 1'b0,
  parameter bit       SHARED_RNG = 1'b0,
  localparam int N     = 1 << D,
  localparam int PKT_W = pkt_w(D, DATA_W),
  localparam int NIN   = D + 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [N-1:0]                       inj_valid,
  input  logic [N-1:0][D-1:0]                inj_fdest,
  input  logic [N-1:0][DATA_W-1:0]           inj_data,
  output logic [N-1:0]                       inj_ready,
  output logic [N-1:0][NIN-1:0]              dlv_valid,
  output logic [N-1:0][NIN-1:0][PKT_W-1:0]   dlv_pkt,
  output logic [N-1:0]                       ev_exchange,
  output logic [N-1:0]                       ev_forced,
  output logic [N-1:0]                       ev_reorder,
  output logic [N-1:0]                       ev_conflict,
  output logic [N-1:0]                       ev_stall
);
  logic [N-1:0][D-1:0]            l_valid, l_ready;
  logic [N-1:0][D-1:0][PKT_W-1:0] l_pkt;
  logic [N-1:0][D-1:0]            s_in_valid, s_in_ready;
  logic [N-1:0][D-1:0][PKT_W-1:0] s_in_pkt;

  for (genvar s = 0; s < N; s++) begin : g_sw
    for (genvar d = 0; d < D; d++) begin : g_link
      localparam int NB = s ^ (1 << d);
      assign s_in_valid[s][d] = l_valid[NB][d];
      assign s_in_pkt[s][d]   = l_pkt[NB][d];
      assign l_ready[s][d]    = s_in_ready[NB][d];
    end

    hc_switch #(
      .D(D), .W(W), .DATA_W(DATA_W), .VARIANT(VARIANT), .OOO(OOO), .SHARED_RNG(SHARED_RNG),
      .SEED(32'h2545F491 + 32'(s) * 32'h9E3779B1)
    ) u_sw (
      .clk(clk), .rst_n(rst_n), .pid(D'(s)),
      .in_valid(s_in_valid[s]), .in_pkt(s_in_pkt[s]), .in_ready(s_in_ready[s]),
      .out_valid(l_valid[s]), .out_pkt(l_pkt[s]), .out_ready(l_ready[s]),
      .inj_valid(inj_valid[s]), .inj_fdest(inj_fdest[s]), .inj_data(inj_data[s]),
      .inj_ready(inj_ready[s]),
      .dlv_valid(dlv_valid[s]), .dlv_pkt(dlv_pkt[s]),
      .ev_exchange(ev_exchange[s]), .ev_forced(ev_forced[s]), .ev_reorder(ev_reorder[s]),
      .ev_conflict(ev_conflict[s]), .ev_stall(ev_stall[s]));
  end
endmodule
