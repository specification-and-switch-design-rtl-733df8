// tb_hc_comparator: exhaustive check of the destination comparator for
// D = 4: every destination against every switch id; diff must be the xor and
// route must be high exactly when the two ids differ.
module tb_hc_comparator;
  localparam int D = 4;
  logic [D-1:0] dest, pid, diff;
  logic route;
  int checks = 0, failures = 0;
  hc_comparator #(.D(D)) dut (.dest(dest), .pid(pid), .diff(diff), .route(route));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        dest = D'(a); pid = D'(b); #1;
        checks++;
        if (diff != D'(a ^ b) || route != (a != b)) begin
          failures++; $display("FAIL dest=%0d pid=%0d diff=%b route=%b", a, b, diff, route);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
