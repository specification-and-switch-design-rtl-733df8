// tb_hc_channel_det: random packets and switch ids (D = 4) through the
// deterministic channel circuit. Reference: a packet whose destination
// equals the switch id is delivered; any other requests exactly the output
// queue of the lowest differing bit. The packet must pass unchanged.
module tb_hc_channel_det;
  localparam int D = 4, DATA_W = 8, PKT_W = 3 * D + 1 + DATA_W;
  logic [D-1:0] pid, req;
  logic valid, deliver;
  logic [PKT_W-1:0] pkt, out_pkt;
  logic [1:0] idx;
  int checks = 0, failures = 0, n_dlv = 0;
  hc_channel_det #(.D(D), .DATA_W(DATA_W)) dut (.pid(pid), .valid(valid), .pkt(pkt), .deliver(deliver),
    .req(req), .idx(idx), .out_pkt(out_pkt));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int c = 0; c < 3000; c++) begin
      int dst, p, low;
      logic [D-1:0] ereq;
      pkt = PKT_W'({$urandom, $urandom});
      pid = D'($urandom);
      if (c % 5 == 0) pkt[D-1:0] = pid;
      valid = (c % 7 != 3);
      dst = int'(pkt[D-1:0]); p = int'(pid);
      low = -1;
      for (int k = D - 1; k >= 0; k--) if ((((dst ^ p) >> k) & 1) == 1) low = k;
      ereq = (valid && low >= 0) ? D'(1 << low) : '0;
      #1;
      checks++;
      if (deliver != (valid && dst == p) || req != ereq || out_pkt != pkt) begin
        failures++; $display("FAIL dst=%0d pid=%0d deliver=%b req=%b exp=%b", dst, p, deliver, req, ereq);
      end
      if (deliver) n_dlv++;
    end
    checks++;
    if (n_dlv == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
