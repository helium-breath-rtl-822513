// Exhaustive test of the full detector: full iff addr >= 128*(sel+1)-1.
`include "tb/tb_util.svh"
module tb_full_detector;
  int checks = 0, failures = 0;
  logic [10:0] addr; logic [3:0] size_sel; logic full;
  full_detector dut (.*);
  initial begin
    for (int s = 0; s < 16; s++)
      for (int a = 0; a < 2048; a++) begin
        size_sel = 4'(s); addr = 11'(a); #1;
        `CHECK(full == (a >= 128 * (s + 1) - 1), $sformatf("sel %0d addr %0d", s, a))
      end
    `TB_FINISH
  end
endmodule
