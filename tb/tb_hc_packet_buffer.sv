// tb_hc_packet_buffer: random load and consume traffic against a one-entry
// model. Checks the held packet, its valid flag and the ready rule (ready
// when empty or when the packet leaves in the same cycle), and that
// back-to-back traffic and holding under back-pressure both occur.
module tb_hc_packet_buffer;
  localparam int PKT_W = 12;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, valid, consume;
  logic [PKT_W-1:0] in_pkt, pkt;
  logic m_valid;
  logic [PKT_W-1:0] m_pkt;
  int checks = 0, failures = 0, n_b2b = 0, n_hold = 0;
  hc_packet_buffer #(.PKT_W(PKT_W)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_pkt(in_pkt),
    .in_ready(in_ready), .valid(valid), .pkt(pkt), .consume(consume));
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    in_valid = 0; consume = 0; in_pkt = '0; m_valid = 0; m_pkt = '0;
    #12 rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 1) == 1);
      in_pkt   = PKT_W'($urandom);
      consume  = m_valid && ($urandom_range(0, 2) != 0);
      #1;
      checks++;
      if (valid != m_valid || (m_valid && pkt != m_pkt) || in_ready != (!m_valid || consume)) begin
        failures++; $display("FAIL c=%0d valid=%b/%b pkt=%h/%h ready=%b", c, valid, m_valid, pkt, m_pkt, in_ready);
      end
      if (in_valid && consume) n_b2b++;
      if (in_valid && m_valid && !consume) n_hold++;
      if (in_valid && (!m_valid || consume)) begin m_valid = 1; m_pkt = in_pkt; end
      else if (consume) m_valid = 0;
    end
    checks++;
    if (n_b2b == 0 || n_hold == 0) begin failures++; $display("FAIL coverage b2b=%0d hold=%0d", n_b2b, n_hold); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
