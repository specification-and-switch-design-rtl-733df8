// tb_hc_network: 8-switch networks (D = 3) with 2-packet output queues.
// First, lone packets are sent between every pair of switches in a
// deterministic network: each must arrive at its destination 1 + 2h cycles
// after the injection edge, h being the Hamming distance of the two ids.
// Then one network of each variant carries the heaviest workload (the
// transpose sent D times from every switch), which must complete with every
// packet delivered once, correctly, and with full queues back-pressuring
// the links. The second randomized network here draws both random values
// of a channel from a single generator.
module tb_hc_network;
  import hc_pkg::*;
  localparam int D = 3, N = 8, DATA_W = 8, PKT_W = 3 * D + 1 + DATA_W, NIN = D + 1;
  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Latency network.
  logic [N-1:0] l_inj_valid, l_inj_ready;
  logic [N-1:0][D-1:0] l_inj_fdest;
  logic [N-1:0][DATA_W-1:0] l_inj_data;
  logic [N-1:0][NIN-1:0] l_dlv_valid;
  logic [N-1:0][NIN-1:0][PKT_W-1:0] l_dlv_pkt;
  hc_network #(.D(D), .W(2), .DATA_W(DATA_W), .VARIANT(VAR_DET)) u_lat (.clk(clk), .rst_n(rst_n),
    .inj_valid(l_inj_valid), .inj_fdest(l_inj_fdest), .inj_data(l_inj_data), .inj_ready(l_inj_ready),
    .dlv_valid(l_dlv_valid), .dlv_pkt(l_dlv_pkt), .ev_exchange(), .ev_forced(), .ev_reorder(),
    .ev_conflict(), .ev_stall());

  // Workload networks, one per variant.
  logic [2:0] done;
  int ck[3], fl[3], cy[3], np[3], stalls[3], forced, exch;
  for (genvar v = 0; v < 3; v++) begin : g_v
    logic [N-1:0] inj_valid, inj_ready, ev_x, ev_f, ev_s;
    logic [N-1:0][D-1:0] inj_fdest;
    logic [N-1:0][DATA_W-1:0] inj_data;
    logic [N-1:0][NIN-1:0] dlv_valid;
    logic [N-1:0][NIN-1:0][PKT_W-1:0] dlv_pkt;
    hc_network #(.D(D), .W(2), .DATA_W(DATA_W), .VARIANT(variant_e'(v)), .OOO(v == 2),
                 .SHARED_RNG(v == 2)) u_net (
      .clk(clk), .rst_n(rst_n), .inj_valid(inj_valid), .inj_fdest(inj_fdest), .inj_data(inj_data),
      .inj_ready(inj_ready), .dlv_valid(dlv_valid), .dlv_pkt(dlv_pkt), .ev_exchange(ev_x),
      .ev_forced(ev_f), .ev_reorder(), .ev_conflict(), .ev_stall(ev_s));
    hc_net_driver #(.D(D), .DATA_W(DATA_W), .VARIANT(variant_e'(v))) u_drv (
      .clk(clk), .rst_n(rst_n), .start(start), .wl(3), .inj_valid(inj_valid), .inj_fdest(inj_fdest),
      .inj_data(inj_data), .inj_ready(inj_ready), .dlv_valid(dlv_valid), .dlv_pkt(dlv_pkt),
      .done(done[v]), .checks(ck[v]), .failures(fl[v]), .cycles(cy[v]), .npkts(np[v]));
    always @(posedge clk) if (start && !done[v]) begin
      stalls[v] += $countones(ev_s);
      if (v == 1) exch += $countones(ev_x);
      if (v == 2) forced += $countones(ev_f);
    end
  end

  initial begin
    l_inj_valid = '0; l_inj_fdest = '0; l_inj_data = '0;
    #12 rst_n = 1;
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) begin
        int lat, h;
        bit ok;
        @(negedge clk);
        l_inj_valid[a] = 1; l_inj_fdest[a] = D'(b); l_inj_data[a] = DATA_W'(a * N + b);
        @(negedge clk);
        l_inj_valid[a] = 0;
        lat = 1;
        while (l_dlv_valid[b] == '0 && lat < 40) begin @(negedge clk); lat++; end
        h = $countones(D'(a ^ b));
        checks++;
        ok = 0;
        for (int q = 0; q < NIN; q++)
          if (l_dlv_valid[b][q] && int'(l_dlv_pkt[b][q][PKT_W-1:3*D+1]) == a * N + b) ok = 1;
        if (lat != 1 + 2 * h || !ok) begin
          failures++; $display("FAIL lone packet %0d -> %0d: latency %0d, expected %0d", a, b, lat, 1 + 2 * h);
        end
      end
    @(negedge clk);
    start = 1;
    wait (done == 3'b111);
    @(negedge clk);
    for (int v = 0; v < 3; v++) begin
      checks += ck[v] + 2;
      failures += fl[v];
      $display("variant %0d: %0d packets in %0d cycles, %0d stall cycles", v, np[v], cy[v], stalls[v]);
      if (stalls[v] == 0) begin failures++; $display("FAIL variant %0d never back-pressured", v); end
      if (ck[v] != np[v]) begin failures++; $display("FAIL variant %0d delivery count %0d", v, ck[v]); end
    end
    $display("exchanges %0d, forced hops %0d", exch, forced);
    checks++;
    if (exch == 0 || forced == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
