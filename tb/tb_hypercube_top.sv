// tb_hypercube_top: end-to-end test of the full design at its default size
// (three 16-switch networks, queues of 8 packets). The three networks run
// the same four workloads one after another: a random permutation, the
// transpose permutation, D random permutations at once (four packets per
// switch), the transpose sent D times, and a saturation run (the transpose
// sent 4D times back to back). Every packet must be delivered
// once, at its final destination, with its payload; the routing time of
// each network and workload is printed. Over the run each mechanism must
// occur at least once: two packets contending for one output queue (all
// networks), destination exchange (first randomized network), forced hop
// (second randomized network), out-of-order departure (second randomized
// network, which uses OOO queues by default), and a full output queue
// back-pressuring a packet (in any network).
module tb_hypercube_top;
  import hc_pkg::*;
  localparam int D = 4, N = 16, DATA_W = 8, PKT_W = 3 * D + 1 + DATA_W, NIN = D + 1;
  logic clk = 0, rst_n = 0, start = 0;
  int wl = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [2:0][N-1:0] inj_valid, inj_ready;
  logic [2:0][N-1:0][D-1:0] inj_fdest;
  logic [2:0][N-1:0][DATA_W-1:0] inj_data;
  logic [2:0][N-1:0][NIN-1:0] dlv_valid;
  logic [2:0][N-1:0][NIN-1:0][PKT_W-1:0] dlv_pkt;
  logic [2:0][N-1:0] ev_conflict, ev_stall;
  logic [N-1:0] r1_ev_exchange, r1_ev_reorder, r2_ev_forced, r2_ev_reorder;

  hypercube_top dut (
    .clk(clk), .rst_n(rst_n),
    .det_inj_valid(inj_valid[0]), .det_inj_fdest(inj_fdest[0]), .det_inj_data(inj_data[0]),
    .det_inj_ready(inj_ready[0]), .det_dlv_valid(dlv_valid[0]), .det_dlv_pkt(dlv_pkt[0]),
    .det_ev_conflict(ev_conflict[0]), .det_ev_stall(ev_stall[0]),
    .r1_inj_valid(inj_valid[1]), .r1_inj_fdest(inj_fdest[1]), .r1_inj_data(inj_data[1]),
    .r1_inj_ready(inj_ready[1]), .r1_dlv_valid(dlv_valid[1]), .r1_dlv_pkt(dlv_pkt[1]),
    .r1_ev_exchange(r1_ev_exchange), .r1_ev_reorder(r1_ev_reorder),
    .r1_ev_conflict(ev_conflict[1]), .r1_ev_stall(ev_stall[1]),
    .r2_inj_valid(inj_valid[2]), .r2_inj_fdest(inj_fdest[2]), .r2_inj_data(inj_data[2]),
    .r2_inj_ready(inj_ready[2]), .r2_dlv_valid(dlv_valid[2]), .r2_dlv_pkt(dlv_pkt[2]),
    .r2_ev_forced(r2_ev_forced), .r2_ev_reorder(r2_ev_reorder),
    .r2_ev_conflict(ev_conflict[2]), .r2_ev_stall(ev_stall[2]));

  logic [2:0] done;
  int ck[3], fl[3], cy[3], np[3];
  int n_conflict[3], n_stall[3], n_exchange, n_forced, n_reorder;
  for (genvar v = 0; v < 3; v++) begin : g_v
    hc_net_driver #(.D(D), .DATA_W(DATA_W), .VARIANT(variant_e'(v))) u_drv (
      .clk(clk), .rst_n(rst_n), .start(start), .wl(wl), .inj_valid(inj_valid[v]),
      .inj_fdest(inj_fdest[v]), .inj_data(inj_data[v]), .inj_ready(inj_ready[v]),
      .dlv_valid(dlv_valid[v]), .dlv_pkt(dlv_pkt[v]), .done(done[v]), .checks(ck[v]),
      .failures(fl[v]), .cycles(cy[v]), .npkts(np[v]));
    always @(posedge clk) if (rst_n) begin
      n_conflict[v] += $countones(ev_conflict[v]);
      n_stall[v]    += $countones(ev_stall[v]);
    end
  end
  always @(posedge clk) if (rst_n) begin
    n_exchange += $countones(r1_ev_exchange);
    n_forced   += $countones(r2_ev_forced);
    n_reorder  += $countones(r2_ev_reorder);
  end

  initial begin
    #12 rst_n = 1;
    for (int w = 0; w < 5; w++) begin
      int c0[3], f0[3];
      for (int v = 0; v < 3; v++) begin c0[v] = ck[v]; f0[v] = fl[v]; end
      @(negedge clk);
      wl = w; start = 1;
      wait (done == 3'b111);
      @(negedge clk);
      for (int v = 0; v < 3; v++) begin
        $display("workload %0d variant %0d: %0d packets delivered in %0d cycles", w, v, np[v], cy[v]);
        checks++;
        if (ck[v] - c0[v] != np[v]) begin failures++; $display("FAIL deliveries %0d", ck[v] - c0[v]); end
      end
      @(negedge clk);
      start = 0;
      repeat (5) @(negedge clk);
    end
    for (int v = 0; v < 3; v++) begin
      checks += ck[v];
      failures += fl[v];
      $display("variant %0d: contention %0d, full-queue refusals %0d", v, n_conflict[v], n_stall[v]);
      checks++;
      if (n_conflict[v] == 0) begin failures++; $display("FAIL variant %0d: no contention", v); end
    end
    // The queues and back-pressure are the same logic in all three networks;
    // the randomized ones spread the load too well to fill 8-packet queues.
    checks++;
    if (n_stall[0] + n_stall[1] + n_stall[2] == 0) begin failures++; $display("FAIL no full queue"); end
    $display("exchanges %0d, forced hops %0d, out-of-order departures %0d", n_exchange, n_forced, n_reorder);
    checks += 3;
    if (n_exchange == 0) failures++;
    if (n_forced == 0) failures++;
    if (n_reorder == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
