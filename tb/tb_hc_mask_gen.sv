// tb_hc_mask_gen: every mask, index and forced flag for D = 4. Dimensions up
// to the index leave the set, a forced hop empties it, and the "all fixed"
// flag is set once the set is empty (and stays set).
module tb_hc_mask_gen;
  localparam int D = 4;
  logic [D:0] mask_in, mask_out;
  logic [1:0] idx;
  logic forced;
  int checks = 0, failures = 0;
  hc_mask_gen #(.D(D)) dut (.mask_in(mask_in), .idx(idx), .forced(forced), .mask_out(mask_out));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int m = 0; m < 32; m++)
      for (int i = 0; i < D; i++)
        for (int f = 0; f < 2; f++) begin
          int t, e;
          t = (f == 1) ? 0 : (m & 15) & ~((2 << i) - 1);
          e = t | (((m >> 4) == 1 || t == 0) ? 16 : 0);
          mask_in = 5'(m); idx = 2'(i); forced = f[0]; #1;
          checks++;
          if (int'(mask_out) != e) begin
            failures++; $display("FAIL m=%b i=%0d f=%0d out=%b exp=%b", mask_in, i, f, mask_out, 5'(e));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
