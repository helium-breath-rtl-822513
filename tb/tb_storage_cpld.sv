// Random control sequences against a reference model of the address logic:
// sampling and shifting counters, pitch multiplier, address mux, BufSel, Full.
`include "tb/tb_util.svh"
module tb_storage_cpld;
  int checks = 0, failures = 0;
  logic clk = 0, rst, count, clear_samp, clear_shift, swap_buf, shift_count, shift_buf;
  logic pitch_up, pitch_down; logic [3:0] buf_size_sel; logic [11:0] sram_addr; logic full;
  logic [7:0] pitch;
  int m_samp, m_shift, m_pitch, m_sel, a, last;
  storage_cpld dut (.*);
  always #5 clk = ~clk;
  `WATCHDOG(60000)
  initial begin
    rst = 1; {count, clear_samp, clear_shift, swap_buf, shift_count, shift_buf, pitch_up, pitch_down} = '0;
    buf_size_sel = 0; @(posedge clk); #1; rst = 0;
    m_samp = 0; m_shift = 0; m_pitch = 64; m_sel = 0;
    for (int i = 0; i < 40000; i++) begin
      count = ($urandom_range(0, 3) != 0); clear_samp = ($urandom_range(0, 999) == 0);
      clear_shift = ($urandom_range(0, 599) == 0); swap_buf = ($urandom_range(0, 499) == 0);
      pitch_up = ($urandom_range(0, 29) == 0); pitch_down = ($urandom_range(0, 31) == 0);
      shift_count = 1'($urandom); shift_buf = 1'($urandom); buf_size_sel = 4'($urandom);
      #1;
      a = shift_count ? (m_shift >> 6) % 2048 : m_samp;
      last = 128 * (int'(buf_size_sel) + 1) - 1;
      `CHECK(sram_addr == {1'(m_sel ^ shift_buf), 11'(a)}, $sformatf("address %h", sram_addr))
      `CHECK(full == (a >= last), "full")
      `CHECK(pitch == 8'(m_pitch), "pitch")
      @(posedge clk); #1;
      if (clear_samp) m_samp = 0; else if (count) m_samp = (m_samp + 1) % 2048;
      if (clear_shift) m_shift = 0; else if (count) m_shift = (m_shift + m_pitch) % (1 << 17);
      if (swap_buf) m_sel = 1 - m_sel;
      if (pitch_up && !pitch_down && m_pitch < 255) m_pitch++;
      else if (pitch_down && !pitch_up && m_pitch > 0) m_pitch--;
    end
    `TB_FINISH
  end
endmodule
