// tb_hc_channel_rand1: random packets through the first randomized channel
// circuit (D = 4). Reference: at its immediate destination the packet takes
// its final destination as immediate one; it is then delivered if that is
// this switch, else it requests the queue of the lowest differing bit. The
// outgoing packet carries the new immediate destination and is marked
// first-phase while immediate and final destinations differ.
module tb_hc_channel_rand1;
  localparam int D = 4, DATA_W = 8, PKT_W = 3 * D + 1 + DATA_W;
  logic [D-1:0] pid, req;
  logic valid, deliver, prio, exchanged;
  logic [PKT_W-1:0] pkt, out_pkt, epkt;
  logic [1:0] idx;
  int checks = 0, failures = 0, n_x = 0, n_dlv = 0;
  hc_channel_rand1 #(.D(D), .DATA_W(DATA_W)) dut (.pid(pid), .valid(valid), .pkt(pkt), .deliver(deliver),
    .req(req), .idx(idx), .out_pkt(out_pkt), .prio(prio), .exchanged(exchanged));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int c = 0; c < 4000; c++) begin
      int im, fi, p, d, low;
      logic [D-1:0] ereq;
      pkt = PKT_W'({$urandom, $urandom});
      pid = D'($urandom);
      if (c % 3 == 0) pkt[D-1:0] = pid;
      if (c % 4 == 0) pkt[2*D-1:D] = pid;
      valid = (c % 11 != 5);
      im = int'(pkt[D-1:0]); fi = int'(pkt[2*D-1:D]); p = int'(pid);
      d = (im == p) ? fi : im;
      low = -1;
      for (int k = D - 1; k >= 0; k--) if ((((d ^ p) >> k) & 1) == 1) low = k;
      ereq = (valid && low >= 0) ? D'(1 << low) : '0;
      epkt = pkt; epkt[D-1:0] = D'(d);
      #1;
      checks++;
      if (deliver != (valid && d == p) || req != ereq || out_pkt != epkt || prio != (d != fi)
          || exchanged != (valid && im == p && im != fi)) begin
        failures++; $display("FAIL im=%0d fi=%0d pid=%0d deliver=%b req=%b exp=%b", im, fi, p, deliver, req, ereq);
      end
      if (exchanged) n_x++;
      if (deliver) n_dlv++;
    end
    checks++;
    if (n_x == 0 || n_dlv == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
