// tb_hc_alt_select: for D = 4 and D = 3, every random value, selection and
// found flag. With a selection the index passes through; without one the
// packet is forced to channel rnd mod D.
module tb_hc_alt_select;
  logic [1:0] rnd4, sel4, idx4, rnd3, sel3, idx3;
  logic found, forced4, forced3;
  int checks = 0, failures = 0;
  hc_alt_select #(.D(4)) dut4 (.rnd(rnd4), .found(found), .sel_idx(sel4), .idx(idx4), .forced(forced4));
  hc_alt_select #(.D(3)) dut3 (.rnd(rnd3), .found(found), .sel_idx(sel3), .idx(idx3), .forced(forced3));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int f = 0; f < 2; f++)
      for (int r = 0; r < 4; r++)
        for (int s = 0; s < 4; s++) begin
          found = f[0]; rnd4 = 2'(r); sel4 = 2'(s); rnd3 = 2'(r); sel3 = 2'(s % 3); #1;
          checks += 2;
          if (forced4 != (f == 0) || int'(idx4) != (f == 1 ? s : r)) begin
            failures++; $display("FAIL D4 f=%0d r=%0d s=%0d idx=%0d", f, r, s, idx4);
          end
          if (forced3 != (f == 0) || int'(idx3) != (f == 1 ? s % 3 : r % 3)) begin
            failures++; $display("FAIL D3 f=%0d r=%0d s=%0d idx=%0d", f, r, s, idx3);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
