// tb_hc_router: every index with valid high and low; the request must be
// the one-hot code of the index, or zero when not valid.
module tb_hc_router;
  localparam int D = 4;
  logic valid;
  logic [1:0] idx;
  logic [D-1:0] req;
  int checks = 0, failures = 0;
  hc_router #(.D(D)) dut (.valid(valid), .idx(idx), .req(req));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 2; v++)
      for (int i = 0; i < D; i++) begin
        valid = v[0]; idx = 2'(i); #1;
        checks++;
        if (req != (v == 1 ? D'(1 << i) : '0)) begin
          failures++; $display("FAIL valid=%0d idx=%0d req=%b", v, i, req);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
