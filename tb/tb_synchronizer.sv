// Tests synchronizer latency and the press / auto-repeat pulse behaviour.
`include "tb/tb_util.svh"
module tb_synchronizer;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic reset_n_async, pitch_up_async, pitch_down_async, shift_async, pass_orig_async, fs_sel_async;
  logic [3:0] buf_size_async; logic a2d_status_async, repeat_tick; logic [1:0] prog_sel_async;
  logic rst, pitch_up_pulse, pitch_down_pulse, shift_s, pass_orig_s, fs_sel_s, a2d_status_s; logic [1:0] prog_sel_s;
  logic [3:0] buf_size_s;
  int ups, downs;
  synchronizer dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(20000)
  always @(posedge clk) begin
    if (pitch_up_pulse) ups++;
    if (pitch_down_pulse) downs++;
  end
  task automatic tick_n(int n);
    repeat (n) begin repeat (20) @(posedge clk); #1 repeat_tick = 1; @(posedge clk); #1 repeat_tick = 0; end
  endtask
  initial begin
    ups = 0; downs = 0;
    reset_n_async = 0; pitch_up_async = 0; pitch_down_async = 0; shift_async = 0;
    pass_orig_async = 0; fs_sel_async = 0; buf_size_async = 0; a2d_status_async = 0; prog_sel_async = 0; repeat_tick = 0;
    repeat (4) @(posedge clk); #1;
    `CHECK(rst == 1, "reset held")
    reset_n_async = 1;
    // level inputs: visible after exactly two clock edges
    for (int i = 0; i < 50; i++) begin
      {prog_sel_async, shift_async, pass_orig_async, fs_sel_async, buf_size_async, a2d_status_async} = 10'($urandom);
      @(posedge clk); #1;
      @(posedge clk); #1;
      `CHECK({prog_sel_s, shift_s, pass_orig_s, fs_sel_s, buf_size_s, a2d_status_s} ==
             {prog_sel_async, shift_async, pass_orig_async, fs_sel_async, buf_size_async, a2d_status_async}, "two-stage latency")
    end
    `CHECK(rst == 0, "reset released")
    ups = 0; downs = 0;
    // one press, no ticks: exactly one pulse
    pitch_up_async = 1; repeat (30) @(posedge clk); pitch_up_async = 0; repeat (5) @(posedge clk);
    `CHECK(ups == 1 && downs == 0, $sformatf("single press ups=%0d", ups))
    // held over 5 ticks: 1 + 5 pulses
    pitch_down_async = 1; repeat (3) @(posedge clk); tick_n(5); pitch_down_async = 0; repeat (5) @(posedge clk);
    `CHECK(downs == 6 && ups == 1, $sformatf("held downs=%0d", downs))
    // both held: nothing
    pitch_up_async = 1; pitch_down_async = 1; repeat (3) @(posedge clk); tick_n(3);
    pitch_up_async = 0; pitch_down_async = 0; repeat (5) @(posedge clk);
    `CHECK(downs == 6 && ups == 1, "both held")
    // ticks with nothing held: nothing
    tick_n(3); `CHECK(downs == 6 && ups == 1, "idle ticks")
    `TB_FINISH
  end
endmodule
