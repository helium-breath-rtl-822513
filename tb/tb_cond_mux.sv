// Exhaustive test of the LS151-style condition multiplexer.
`include "tb/tb_util.svh"
module tb_cond_mux;
  int checks = 0, failures = 0;
  logic [7:0] d; logic [2:0] sel; logic g_n, y, w_n;
  cond_mux dut (.*);
  initial begin
    for (int i = 0; i < 256; i++)
      for (int s = 0; s < 8; s++)
        for (int g = 0; g < 2; g++) begin
          d = 8'(i); sel = 3'(s); g_n = 1'(g);
          #1;
          `CHECK(y == (g == 0 && ((i >> s) & 1) == 1), "y")
          `CHECK(w_n == !y, "w_n")
        end
    `TB_FINISH
  end
endmodule
