// Measures the SAMPLING period and duty cycle at both rates (96 and 48 clocks at
// the default 921.6 kHz clock).
`include "tb/tb_util.svh"
module tb_timing_unit;
  int checks = 0, failures = 0;
  logic clk = 0, rst, fs_sel, sampling;
  int t_rise, t_prev, high_cnt;
  timing_unit dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  task automatic measure(int exp_period);
    // skip two periods so a rate change has settled
    repeat (2) begin @(posedge sampling); end
    t_prev = 0; high_cnt = 0;
    @(posedge clk); while (!(sampling)) @(posedge clk);
    for (int c = 0; c < exp_period * 4; c++) begin
      if (sampling) high_cnt++;
      @(posedge clk);
    end
    `CHECK(high_cnt == exp_period * 2, $sformatf("high clocks %0d in 4 periods of %0d", high_cnt, exp_period))
    // period: clocks between rising edges
    t_rise = 0;
    while (sampling) @(posedge clk);
    while (!sampling) @(posedge clk);
    while (sampling) begin t_rise++; @(posedge clk); end
    while (!sampling) begin t_rise++; @(posedge clk); end
    `CHECK(t_rise == exp_period, $sformatf("period %0d expected %0d", t_rise, exp_period))
  endtask
  initial begin
    rst = 1; fs_sel = 0; repeat (2) @(posedge clk); rst = 0;
    measure(96);
    fs_sel = 1; measure(48);
    fs_sel = 0; measure(96);
    `TB_FINISH
  end
endmodule
