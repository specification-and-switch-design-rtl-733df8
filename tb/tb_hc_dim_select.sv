// tb_hc_dim_select: all decision vectors against all masks for D = 4. The
// selected dimension must be the smallest one both allowed and chosen.
module tb_hc_dim_select;
  localparam int D = 4;
  logic [D-1:0] decide, mask;
  logic [1:0] idx;
  logic found;
  int checks = 0, failures = 0;
  hc_dim_select #(.D(D)) dut (.decide(decide), .mask(mask), .idx(idx), .found(found));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int a = 0; a < 16; a++)
      for (int m = 0; m < 16; m++) begin
        int e;
        e = -1;
        for (int k = D - 1; k >= 0; k--) if (((a >> k) & (m >> k) & 1) == 1) e = k;
        decide = D'(a); mask = D'(m); #1;
        checks++;
        if (found != (e >= 0) || (e >= 0 && int'(idx) != e)) begin
          failures++; $display("FAIL decide=%b mask=%b idx=%0d found=%b", decide, mask, idx, found);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
