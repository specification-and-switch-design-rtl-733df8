// hc_switch_harness: drives one switch (D = 3, queues of 2 packets, id 5)
// with random traffic on its three incoming channels and its injection port
// and random back-pressure on its outgoing channels, and scores every
// packet. Each packet carries a unique tag in its payload. On leaving, a
// packet must appear exactly once: delivered if its (possibly exchanged)
// immediate destination is this switch, otherwise on the channel of the
// lowest bit in which that destination differs from the switch id, with
// final destination and payload intact. First, a lone packet measures the
// latency from the input edge to the outgoing channel (expected 2 cycles).
// Reports checks, failures and how often queues were contended or full.
module hc_switch_harness
  import hc_pkg::*;
#(
  parameter variant_e VARIANT = VAR_DET
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_conflict,
  output int   n_stall,
  output int   n_exchange
);
  localparam int D = 3, W = 2, DATA_W = 8, PKT_W = 3 * D + 1 + DATA_W, NIN = D + 1;
  localparam logic [D-1:0] PID = 3'd5;
  logic [D-1:0] in_valid, in_ready, out_valid, out_ready;
  logic [D-1:0][PKT_W-1:0] in_pkt, out_pkt;
  logic inj_valid, inj_ready, ev_exchange, ev_forced, ev_reorder, ev_conflict, ev_stall;
  logic [D-1:0] inj_fdest;
  logic [DATA_W-1:0] inj_data;
  logic [NIN-1:0] dlv_valid;
  logic [NIN-1:0][PKT_W-1:0] dlv_pkt;

  hc_switch #(.D(D), .W(W), .DATA_W(DATA_W), .VARIANT(VARIANT), .OOO(1'b0), .SEED(32'h77)) dut (
    .clk(clk), .rst_n(rst_n), .pid(PID), .in_valid(in_valid), .in_pkt(in_pkt), .in_ready(in_ready),
    .out_valid(out_valid), .out_pkt(out_pkt), .out_ready(out_ready), .inj_valid(inj_valid),
    .inj_fdest(inj_fdest), .inj_data(inj_data), .inj_ready(inj_ready), .dlv_valid(dlv_valid),
    .dlv_pkt(dlv_pkt), .ev_exchange(ev_exchange), .ev_forced(ev_forced), .ev_reorder(ev_reorder),
    .ev_conflict(ev_conflict), .ev_stall(ev_stall));

  // Scoreboard indexed by tag: in flight, original immediate and final dest.
  bit          live[256];
  int          s_idest[256], s_fdest[256];
  bit          s_inj[256];
  int          next_tag = 0, in_flight = 0;

  function automatic int lowbit(input int v);
    for (int k = 0; k < D; k++) if (((v >> k) & 1) == 1) return k;
    return -1;
  endfunction

  // Expected immediate destination after this switch.
  function automatic int eff_dest(input int tag, input int out_idest);
    if (s_inj[tag] && VARIANT == VAR_RAND1) return out_idest;   // drawn at random inside
    if (VARIANT == VAR_RAND1 && s_idest[tag] == int'(PID)) return s_fdest[tag];
    return s_idest[tag];
  endfunction

  task automatic check_leave(input int tag, input logic [PKT_W-1:0] p, input int chan, input bit dlv);
    int e;
    checks++;
    e = eff_dest(tag, int'(p[D-1:0]));
    if (!live[tag]) begin failures++; $display("FAIL v%0d tag %0d leaves twice", VARIANT, tag); return; end
    if (int'(p[2*D-1:D]) != s_fdest[tag] || int'(p[D-1:0]) != e
        || (dlv ? (e != int'(PID)) : (lowbit(e ^ int'(PID)) != chan))) begin
      failures++;
      $display("FAIL v%0d tag %0d dlv=%0d chan=%0d idest=%0d fdest=%0d exp dest %0d", VARIANT, tag, dlv, chan,
               p[D-1:0], p[2*D-1:D], e);
    end
    live[tag] = 0;
    in_flight--;
  endtask

  function automatic logic [PKT_W-1:0] mkpkt(input int idest, input int fdest, input int tag);
    logic [PKT_W-1:0] p;
    p = '0;
    p[D-1:0] = D'(idest); p[2*D-1:D] = D'(fdest); p[PKT_W-1:3*D+1] = DATA_W'(tag);
    return p;
  endfunction

  // Outgoing side: check everything that leaves.
  always @(negedge clk) if (rst_n) begin
    #2;
    for (int d = 0; d < D; d++)
      if (out_valid[d] && out_ready[d]) check_leave(int'(out_pkt[d][PKT_W-1:3*D+1]), out_pkt[d], d, 0);
    for (int q = 0; q < NIN; q++)
      if (dlv_valid[q]) check_leave(int'(dlv_pkt[q][PKT_W-1:3*D+1]), dlv_pkt[q], -1, 1);
    if (ev_conflict) n_conflict++;
    if (ev_stall) n_stall++;
    if (ev_exchange) n_exchange++;
  end

  initial begin
    int lat;
    done = 0; checks = 0; failures = 0; n_conflict = 0; n_stall = 0; n_exchange = 0;
    in_valid = '0; in_pkt = '0; inj_valid = 0; inj_fdest = '0; inj_data = '0; out_ready = '1;
    @(posedge rst_n);
    // Latency of a lone packet: channel 1 in, destination 4 (differs from 5 in bit 0).
    @(negedge clk);
    in_valid[1] = 1; in_pkt[1] = mkpkt(4, 4, 255);
    live[255] = 1; s_idest[255] = 4; s_fdest[255] = 4; s_inj[255] = 0; in_flight++;
    @(negedge clk);
    in_valid[1] = 0;
    lat = 1;
    while (!out_valid[0] && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 2) begin failures++; $display("FAIL v%0d lone packet latency %0d", VARIANT, lat); end
    repeat (3) @(negedge clk);
    // Random traffic.
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      #1;
      for (int d = 0; d < D; d++) begin
        if (in_valid[d] && in_ready[d]) in_valid[d] = 0;     // accepted at the last edge
        if (!in_valid[d] && $urandom_range(0, 2) == 0 && in_flight < 200) begin
          int im, fi;
          im = $urandom_range(0, 7); fi = $urandom_range(0, 7);
          while (live[next_tag] || next_tag == 255) next_tag = (next_tag + 1) % 256;
          live[next_tag] = 1; s_idest[next_tag] = im; s_fdest[next_tag] = fi; s_inj[next_tag] = 0;
          in_flight++;
          in_valid[d] = 1; in_pkt[d] = mkpkt(im, fi, next_tag);
        end
      end
      if (inj_valid && inj_ready) inj_valid = 0;
      if (!inj_valid && $urandom_range(0, 3) == 0) begin
        int fi;
        fi = $urandom_range(0, 7);
        while (live[next_tag] || next_tag == 255) next_tag = (next_tag + 1) % 256;
        live[next_tag] = 1; s_idest[next_tag] = fi; s_fdest[next_tag] = fi; s_inj[next_tag] = 1;
        in_flight++;
        inj_valid = 1; inj_fdest = D'(fi); inj_data = DATA_W'(next_tag);
      end
      for (int d = 0; d < D; d++) out_ready[d] = ($urandom_range(0, 2) != 0);
    end
    // Drain.
    @(negedge clk);
    #1;
    for (int d = 0; d < D; d++) if (in_valid[d] && in_ready[d]) in_valid[d] = 0;
    if (inj_valid && inj_ready) inj_valid = 0;
    out_ready = '1;
    for (int c = 0; c < 200 && (in_valid != 0 || inj_valid); c++) begin
      @(negedge clk);
      #1;
      for (int d = 0; d < D; d++) if (in_valid[d] && in_ready[d]) in_valid[d] = 0;
      if (inj_valid && inj_ready) inj_valid = 0;
    end
    repeat (20) @(negedge clk);
    checks++;
    if (in_flight != 0) begin failures++; $display("FAIL v%0d %0d packets never left", VARIANT, in_flight); end
    done = 1;
  end
endmodule
