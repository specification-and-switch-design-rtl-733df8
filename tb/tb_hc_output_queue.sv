// tb_hc_output_queue: a first-come first-served queue and an out-of-order
// queue (W = 4, three write ports) receive the same random writes and
// reads. Each is compared with a list model: which writes are granted
// (port order, while room remains), whether a packet is offered and which
// one (the oldest, or for the OOO queue the oldest marked first-phase).
// Coverage: queue full with a write refused, several writes in one cycle,
// and a reordering in the OOO queue.
module tb_hc_output_queue;
  localparam int PKT_W = 10, W = 4, NWR = 3;
  logic clk = 0, rst_n = 0;
  logic [NWR-1:0] wr_valid, wr_prio, g0, g1;
  logic [NWR-1:0][PKT_W-1:0] wr_data;
  logic v0, v1, r0, r1, p0, p1, ro0, ro1;
  logic [PKT_W-1:0] d0, d1;
  int checks = 0, failures = 0, n_full = 0, n_multi = 0, n_reord = 0;
  logic [PKT_W:0] mq[2][$];   // {prio, data}

  hc_output_queue #(.PKT_W(PKT_W), .W(W), .NWR(NWR), .OOO(1'b0)) q0 (.clk(clk), .rst_n(rst_n),
    .wr_valid(wr_valid), .wr_data(wr_data), .wr_prio(wr_prio), .wr_grant(g0), .rd_valid(v0),
    .rd_data(d0), .rd_prio(p0), .rd_ready(r0), .count(), .reordered(ro0));
  hc_output_queue #(.PKT_W(PKT_W), .W(W), .NWR(NWR), .OOO(1'b1)) q1 (.clk(clk), .rst_n(rst_n),
    .wr_valid(wr_valid), .wr_data(wr_data), .wr_prio(wr_prio), .wr_grant(g1), .rd_valid(v1),
    .rd_data(d1), .rd_prio(p1), .rd_ready(r1), .count(), .reordered(ro1));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(input int q, input logic [NWR-1:0] g, input logic v, input logic [PKT_W-1:0] d,
                      input logic p, input logic rdy, input logic ro);
    int sel, granted;
    logic [NWR-1:0] eg;
    sel = 0;
    if (q == 1) begin
      for (int i = mq[q].size() - 1; i >= 0; i--) if (mq[q][i][PKT_W]) sel = i;
    end
    granted = 0; eg = '0;
    for (int k = 0; k < NWR; k++)
      if (wr_valid[k] && granted + mq[q].size() < W) begin eg[k] = 1; granted++; end
    checks++;
    if (g != eg) begin failures++; $display("FAIL q%0d grant %b exp %b", q, g, eg); end
    checks++;
    if (v != (mq[q].size() != 0)) begin failures++; $display("FAIL q%0d valid %b", q, v); end
    else if (v && {p, d} != mq[q][sel]) begin
      failures++; $display("FAIL q%0d data %h exp %h", q, {p, d}, mq[q][sel]);
    end
    if (wr_valid & ~eg) n_full++;
    if (ro) n_reord++;
    if (v && rdy) mq[q].delete(sel);
    for (int k = 0; k < NWR; k++) if (eg[k]) mq[q].push_back({wr_prio[k], wr_data[k]});
  endtask

  initial begin
    wr_valid = '0; wr_prio = '0; wr_data = '0; r0 = 0; r1 = 0;
    #12 rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      for (int k = 0; k < NWR; k++) begin
        wr_valid[k] = ($urandom_range(0, 3) == 0);
        wr_prio[k]  = ($urandom_range(0, 1) == 1);
        wr_data[k]  = PKT_W'($urandom);
      end
      r0 = ($urandom_range(0, 1) == 1);
      r1 = r0;
      if ($countones(wr_valid) > 1) n_multi++;
      #1;
      step(0, g0, v0, d0, p0, r0, ro0);
      step(1, g1, v1, d1, p1, r1, ro1);
    end
    checks++;
    if (n_full == 0 || n_multi == 0 || n_reord == 0) begin
      failures++; $display("FAIL coverage full=%0d multi=%0d reorder=%0d", n_full, n_multi, n_reord);
    end
    $display("refused writes=%0d reorderings=%0d", n_full, n_reord);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
