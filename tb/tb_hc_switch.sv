// tb_hc_switch: a deterministic and a first-variant randomized switch, each
// driven and scored by hc_switch_harness (random traffic, random
// back-pressure, per-packet routing check, lone-packet latency). Output
// queue contention, full queues and destination exchanges must each occur.
module tb_hc_switch;
  import hc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic done0, done1;
  int c0, f0, k0, s0, x0, c1, f1, k1, s1, x1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  hc_switch_harness #(.VARIANT(VAR_DET))   h0 (.clk(clk), .rst_n(rst_n), .done(done0), .checks(c0),
    .failures(f0), .n_conflict(k0), .n_stall(s0), .n_exchange(x0));
  hc_switch_harness #(.VARIANT(VAR_RAND1)) h1 (.clk(clk), .rst_n(rst_n), .done(done1), .checks(c1),
    .failures(f1), .n_conflict(k1), .n_stall(s1), .n_exchange(x1));
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #12 rst_n = 1;
    wait (done0 && done1);
    checks = c0 + c1 + 1;
    failures = f0 + f1;
    $display("det: contention %0d stalls %0d; rand1: contention %0d stalls %0d exchanges %0d", k0, s0, k1, s1, x1);
    if (k0 == 0 || s0 == 0 || k1 == 0 || s1 == 0 || x1 == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
