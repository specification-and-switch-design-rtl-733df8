// tb_hc_workloads: the routing schemes compared in the evaluation, on
// networks of 4, 8 and 32 switches (D = 2, 3, 5) with 8-packet queues:
// deterministic (Det-R), first randomized variant with FIFO queues
// (Rand-Trans) and with phase-priority queues (Rand-Trans-OOO), second
// randomized variant with phase-priority queues (DRand-Trans-OOO). All
// twelve networks run the same four loads one after another: a random
// permutation, the transpose, D random permutations at once, and the
// transpose D times (one and D packets per switch). Every packet must be
// delivered once at its destination. For each load the routing time in
// cycles and the speedup of each randomized scheme over Det-R are printed
// (above 1 means faster than Det-R).
module tb_hc_workloads;
  import hc_pkg::*;
  localparam int NS = 3, NV = 4;
  localparam int DS[NS] = '{2, 3, 5};
  localparam variant_e VS[NV] = '{VAR_DET, VAR_RAND1, VAR_RAND1, VAR_RAND2};
  localparam bit OS[NV] = '{1'b0, 1'b0, 1'b1, 1'b1};
  localparam string NAMES[NV] = '{"Det-R", "Rand-Trans", "Rand-Trans-OOO", "DRand-Trans-OOO"};
  localparam string LOADS[4] = '{"random permutation", "transpose", "D random permutations", "transpose x D"};
  logic clk = 0, rst_n = 0, start = 0;
  int wl = 0;
  int checks = 0, failures = 0;
  logic [NS*NV-1:0] done;
  int ck[NS*NV], fl[NS*NV], cy[NS*NV], np[NS*NV];
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  for (genvar s = 0; s < NS; s++) begin : g_s
    for (genvar v = 0; v < NV; v++) begin : g_v
      hc_wl_unit #(.D(DS[s]), .VARIANT(VS[v]), .OOO(OS[v])) u (.clk(clk), .rst_n(rst_n), .start(start),
        .wl(wl), .done(done[s*NV+v]), .checks(ck[s*NV+v]), .failures(fl[s*NV+v]), .cycles(cy[s*NV+v]),
        .npkts(np[s*NV+v]));
    end
  end

  initial begin
    #12 rst_n = 1;
    for (int w = 0; w < 4; w++) begin
      int c0[NS*NV];
      for (int u = 0; u < NS * NV; u++) c0[u] = ck[u];
      @(negedge clk);
      wl = w; start = 1;
      wait (done == '1);
      @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        $display("%s, %0d switches:", LOADS[w], 1 << DS[s]);
        for (int v = 0; v < NV; v++) begin
          int u;
          u = s * NV + v;
          $display("  %-16s %4d packets %4d cycles  speedup %0.2f", NAMES[v], np[u], cy[u],
                   real'(cy[s*NV]) / real'(cy[u]));
          checks++;
          if (ck[u] - c0[u] != np[u]) begin failures++; $display("FAIL deliveries %0d", ck[u] - c0[u]); end
        end
      end
      @(negedge clk);
      start = 0;
      repeat (5) @(negedge clk);
    end
    for (int u = 0; u < NS * NV; u++) begin checks += ck[u]; failures += fl[u]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
