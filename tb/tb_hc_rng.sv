// tb_hc_rng: the generator output is compared cycle by cycle with an
// independent xorshift32 model for 2000 cycles, after reset with a given
// seed and with the zero seed; a crude balance check makes sure every
// output bit toggles about half of the time.
module tb_hc_rng;
  logic clk = 0, rst_n = 0;
  logic [7:0] rnd_a, rnd_z;
  int checks = 0, failures = 0, ones[8];
  hc_rng #(.OUT_W(8), .SEED(32'hDEADBEEF)) dut_a (.clk(clk), .rst_n(rst_n), .rnd(rnd_a));
  hc_rng #(.OUT_W(8), .SEED(32'h0))        dut_z (.clk(clk), .rst_n(rst_n), .rnd(rnd_z));
  always #5 clk = ~clk;
  function automatic logic [31:0] xs(input logic [31:0] x);
    x = x ^ (x << 13); x = x ^ (x >> 17); x = x ^ (x << 5);
    return x;
  endfunction
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] ma, mz;
    ma = 32'hDEADBEEF; mz = 32'h1;
    #12 rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(posedge clk);
      ma = xs(ma); mz = xs(mz);
      @(negedge clk);
      checks++;
      if (rnd_a != ma[7:0] || rnd_z != mz[7:0]) begin
        failures++; $display("FAIL cycle %0d a=%h/%h z=%h/%h", c, rnd_a, ma[7:0], rnd_z, mz[7:0]);
      end
      for (int b = 0; b < 8; b++) ones[b] += int'(rnd_a[b]);
    end
    for (int b = 0; b < 8; b++) begin
      checks++;
      if (ones[b] < 850 || ones[b] > 1150) begin failures++; $display("FAIL bit %0d ones=%0d", b, ones[b]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
