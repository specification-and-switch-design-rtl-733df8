// hc_wl_unit: one network (2^D switches, queue depth 8) with its processor
// driver, for workload runs. Passes the driver's start/wl controls in and
// its score and routing time out.
module hc_wl_unit
  import hc_pkg::*;
#(
  parameter int       D       = 3,
  parameter variant_e VARIANT = VAR_DET,
  parameter bit       OOO     = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  int   wl,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles,
  output int   npkts
);
  localparam int N = 1 << D, DATA_W = 8, PKT_W = 3 * D + 1 + DATA_W, NIN = D + 1;
  logic [N-1:0] inj_valid, inj_ready;
  logic [N-1:0][D-1:0] inj_fdest;
  logic [N-1:0][DATA_W-1:0] inj_data;
  logic [N-1:0][NIN-1:0] dlv_valid;
  logic [N-1:0][NIN-1:0][PKT_W-1:0] dlv_pkt;

  hc_network #(.D(D), .W(8), .DATA_W(DATA_W), .VARIANT(VARIANT), .OOO(OOO)) u_net (
    .clk(clk), .rst_n(rst_n), .inj_valid(inj_valid), .inj_fdest(inj_fdest), .inj_data(inj_data),
    .inj_ready(inj_ready), .dlv_valid(dlv_valid), .dlv_pkt(dlv_pkt), .ev_exchange(), .ev_forced(),
    .ev_reorder(), .ev_conflict(), .ev_stall());
  hc_net_driver #(.D(D), .DATA_W(DATA_W), .VARIANT(VARIANT)) u_drv (
    .clk(clk), .rst_n(rst_n), .start(start), .wl(wl), .inj_valid(inj_valid), .inj_fdest(inj_fdest),
    .inj_data(inj_data), .inj_ready(inj_ready), .dlv_valid(dlv_valid), .dlv_pkt(dlv_pkt),
    .done(done), .checks(checks), .failures(failures), .cycles(cycles), .npkts(npkts));
endmodule
