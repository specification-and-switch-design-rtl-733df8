// tb_hc_priority_encoder: exhaustive check for D = 5 (a width that is not a
// power of two): idx must be the lowest set bit, found its presence.
module tb_hc_priority_encoder;
  localparam int D = 5;
  logic [D-1:0] vec;
  logic [2:0] idx;
  logic found;
  int checks = 0, failures = 0;
  hc_priority_encoder #(.D(D)) dut (.vec(vec), .idx(idx), .found(found));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 32; v++) begin
      int exp_i;
      exp_i = 0;
      for (int k = 0; k < D; k++) if (((v >> k) & 1) == 1) begin exp_i = k; break; end
      vec = D'(v); #1;
      checks++;
      if (found != (v != 0) || (v != 0 && int'(idx) != exp_i)) begin
        failures++; $display("FAIL vec=%b idx=%0d found=%b", vec, idx, found);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
