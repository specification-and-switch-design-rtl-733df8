// tb_hc_dest_exchange: all immediate, final and switch ids for D = 4. The
// final destination must replace the immediate one exactly when the packet
// stands at its immediate destination.
module tb_hc_dest_exchange;
  localparam int D = 4;
  logic [D-1:0] idest, fdest, pid, dest;
  logic exchanged;
  int checks = 0, failures = 0;
  hc_dest_exchange #(.D(D)) dut (.idest(idest), .fdest(fdest), .pid(pid), .dest(dest), .exchanged(exchanged));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        for (int c = 0; c < 16; c++) begin
          idest = D'(a); fdest = D'(b); pid = D'(c); #1;
          checks++;
          if (int'(dest) != (a == c ? b : a) || exchanged != (a == c && a != b)) begin
            failures++; $display("FAIL i=%0d f=%0d p=%0d dest=%0d x=%b", a, b, c, dest, exchanged);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
