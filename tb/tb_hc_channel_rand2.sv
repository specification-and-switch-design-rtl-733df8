// tb_hc_channel_rand2: random packets, in both routing phases, through the
// second randomized channel circuit (D = 4). The two random sources are
// followed by xorshift32 models with the block's seeds, so every decision
// is predicted: in the first phase the dimension is the lowest one that is
// in the mask and whose random destination bit differs from the switch id,
// or, if none, the random neighbour rnd mod D with the mask emptied; in the
// second phase routing is deterministic towards the final destination.
// A second instance draws both from one generator (SHARED_RNG = 1) and is
// checked the same way. Also checked: a first-phase packet offered along
// dimension 0 about half of the time, and forced hops happening.
module tb_hc_channel_rand2;
  localparam int D = 4, DATA_W = 8, PKT_W = 3 * D + 1 + DATA_W;
  localparam logic [31:0] SEED = 32'h12345678;
  logic clk = 0, rst_n = 0;
  logic [D-1:0] pid, req;
  logic valid, deliver, prio, forced;
  logic [PKT_W-1:0] pkt, out_pkt, epkt;
  logic [1:0] idx;
  int checks = 0, failures = 0, n_forced = 0, n_dlv = 0, n_first = 0, n_dim0 = 0;
  logic [D-1:0] req_s;
  logic deliver_s, prio_s, forced_s;
  logic [PKT_W-1:0] out_pkt_s;
  logic [1:0] idx_s;
  hc_channel_rand2 #(.D(D), .DATA_W(DATA_W), .SEED(SEED)) dut (.clk(clk), .rst_n(rst_n), .pid(pid),
    .valid(valid), .pkt(pkt), .deliver(deliver), .req(req), .idx(idx), .out_pkt(out_pkt), .prio(prio),
    .forced(forced));
  hc_channel_rand2 #(.D(D), .DATA_W(DATA_W), .SEED(SEED), .SHARED_RNG(1'b1)) dut_s (.clk(clk),
    .rst_n(rst_n), .pid(pid), .valid(valid), .pkt(pkt), .deliver(deliver_s), .req(req_s), .idx(idx_s),
    .out_pkt(out_pkt_s), .prio(prio_s), .forced(forced_s));

  // Expected behaviour for given random id and random neighbour bits.
  task automatic check(input string name, input int rid, input int rnb, input logic dl, input logic [D-1:0] rq,
                       input logic fc, input logic [PKT_W-1:0] op, input logic pr);
    int fi, p, t, fx, dsel, eidx, et, efx;
    logic [D-1:0] ereq;
    logic edlv, efrc;
    logic [PKT_W-1:0] ep;
    fi = int'(pkt[2*D-1:D]); p = int'(pid); t = int'(pkt[3*D-1:2*D]); fx = int'(pkt[3*D]);
    edlv = 0; efrc = 0; eidx = 0; et = t; efx = fx;
    if (fx == 1) begin
      dsel = -1;
      for (int k = D - 1; k >= 0; k--) if ((((fi ^ p) >> k) & 1) == 1) dsel = k;
      if (dsel < 0) edlv = 1; else eidx = dsel;
    end else begin
      dsel = -1;
      for (int k = D - 1; k >= 0; k--) if (((((rid ^ p) & t) >> k) & 1) == 1) dsel = k;
      if (dsel < 0) begin efrc = 1; eidx = rnb % D; et = 0; end
      else begin eidx = dsel; et = t & ~((2 << dsel) - 1); end
      if (et == 0) efx = 1;
    end
    ereq = (valid && !edlv) ? D'(1 << eidx) : '0;
    ep = pkt; ep[3*D:2*D] = (D + 1)'((efx << D) | et);
    checks++;
    if (dl != (valid && edlv) || rq != ereq || fc != (valid && efrc) || (!edlv && op != ep)
        || (!edlv && pr != (efx == 0))) begin
      failures++;
      $display("FAIL %s fi=%0d pid=%0d t=%b fx=%0d req=%b exp=%b mask=%b exp=%b", name, fi, p, 4'(t), fx,
               rq, ereq, op[3*D:2*D], ep[3*D:2*D]);
    end
  endtask
  always #5 clk = ~clk;
  function automatic logic [31:0] xs(input logic [31:0] x);
    x = x ^ (x << 13); x = x ^ (x >> 17); x = x ^ (x << 5);
    return x;
  endfunction
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] ra, rb, rs;
    ra = SEED; rb = SEED ^ 32'h9E3779B9; rs = SEED;
    valid = 0; pkt = '0; pid = '0;
    #12 rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(posedge clk);
      ra = xs(ra); rb = xs(rb); rs = xs(rs);
      @(negedge clk);
      pkt = PKT_W'({$urandom, $urandom});
      pid = D'($urandom);
      if (c % 4 == 0) pkt[2*D-1:D] = pid;
      if (pkt[3*D]) pkt[3*D-1:2*D] = '0;     // fixed flag implies empty set
      valid = (c % 13 != 6);
      #1;
      check("two sources", int'(ra[D-1:0]), int'(rb[1:0]), deliver, req, forced, out_pkt, prio);
      check("one source", int'(rs[D-1:0]), int'(rs[D+1:D]), deliver_s, req_s, forced_s, out_pkt_s, prio_s);
      if (forced) n_forced++;
      if (deliver) n_dlv++;
      if (valid && !pkt[3*D] && pkt[2*D]) begin
        n_first++;
        if (req[0]) n_dim0++;
      end
    end
    checks++;
    if (n_forced == 0 || n_dlv == 0) begin failures++; $display("FAIL coverage"); end
    checks++;
    if (n_dim0 * 100 < n_first * 40 || n_dim0 * 100 > n_first * 60) begin
      failures++; $display("FAIL dimension 0 taken %0d of %0d", n_dim0, n_first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
