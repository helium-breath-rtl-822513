// End-to-end test of the pitch shifter at its default parameters (921.6 kHz
// clock, 9600/19200 Hz sampling, 15 Hz button auto-repeat, buffers up to 2048).
//
// An A2D model feeds a test waveform and a D2A model receives the output. A
// sample-level reference model of the algorithm (two SRAM halves, a sampling
// index, a fractional shifting index, buffer swap on full, shifting index
// restart on full) predicts every output word, which is checked in every mode:
// the converter loopback test program, the storage ramp test program, the
// adder test program, then pass original, shift only, mix, with the pitch raised and lowered by the buttons,
// at both sampling rates, and with a small and the largest buffer.
// Also checked: the sampling period (96 or 48 clocks) and the auto-repeat period
// of a held pitch button (640 sampling periods). Each mechanism is counted and a
// mechanism that never happened counts as a failure.
`include "tb/tb_util.svh"
module tb_pitch_shifter;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic reset_n, pitch_up, pitch_down, shift_sw, pass_orig_sw, fs_sel;
  logic [3:0] buf_size_sel;
  logic [1:0] prog_sel;
  logic [7:0] a2d_data, d2a_data, pitch, upc, dac_out;
  logic a2d_status, a2d_w_n, a2d_cs_n, d2a_cs_n;
  int conversions;

  pitch_shifter dut (.*);
  ad670_model adc (.clk(clk), .w_n(a2d_w_n), .cs_n(a2d_cs_n), .status(a2d_status),
                   .data(a2d_data), .conversions(conversions));
  ad558_model dac (.cs_n(d2a_cs_n), .data(d2a_data), .out(dac_out));

  always #5 clk = ~clk;
  `WATCHDOG(6_000_000)

  // ---- reference model state ----
  logic [7:0] half [2][2048];
  bit         hvalid [2][2048];
  int  m_b = 0, m_samp = 0, m_shift = 0;
  logic [7:0] x_last;
  bit  have_x = 0, model_on = 0;
  int  cyc = 0, last_out_cyc = -1, period_exp = 96, samples = 0, stable = 0;
  // mechanism counters
  int n_swap = 0, n_swap2048 = 0, n_wrap = 0, n_pass = 0, n_shift = 0, n_mix = 0, n_mix_ovf = 0;
  int n_up = 0, n_down = 0, n_fast = 0, n_busy = 0, n_checked_shift = 0, n_loop = 0, n_ramp = 0;
  bit loop_on = 0, ramp_on = 0, add_on = 0;
  int n_add = 0, n_add_restart = 0, n_add_ovf = 0, add_idx = 0;
  logic [7:0] add_acc = 0;
  logic [7:0] pitch_prev = 8'h40;
  int last_pitch_change = -1, repeat_checks = 0, hold_changes = 0;
  logic btn_prev = 0;

  always @(posedge clk) cyc++;

  // A2D busy seen by the control unit while it waits
  always @(posedge clk) if (dut.u_mcu.upc == 8'd8 && dut.status_s) n_busy++;

  // pitch changes: one step at a time; while held, one per 640 sampling periods
  always @(posedge clk) begin
    btn_prev <= pitch_up | pitch_down;
    if ((pitch_up | pitch_down) && !btn_prev) hold_changes = 0;
    if (reset_n && pitch != pitch_prev) begin
      hold_changes++;
      `CHECK(pitch == pitch_prev + 8'd1 || pitch == pitch_prev - 8'd1, "pitch moves by one")
      if (pitch == pitch_prev + 8'd1) n_up++; else n_down++;
      // change 1 of a hold is the press itself, change 2 the first tick of the
      // free-running divider; from change 3 on the spacing is one tick period
      if (hold_changes >= 3 && (pitch_up || pitch_down)) begin
        `CHECK(cyc - last_pitch_change == 640 * period_exp,
               $sformatf("auto-repeat interval %0d clocks", cyc - last_pitch_change))
        repeat_checks++;
      end
      last_pitch_change = cyc;
    end
    pitch_prev <= pitch;
  end

  // sample-level reference
  always @(posedge clk) begin
    int last, a, expv, y;
    bit yv, sfull;
    if (!a2d_cs_n && a2d_w_n) begin x_last = a2d_data; have_x = 1; end
    // loopback test program: the output is the sample just converted
    if (!d2a_cs_n && loop_on) begin
      `CHECK(have_x && d2a_data == x_last, $sformatf("loopback output %0d expected %0d", d2a_data, x_last))
      if (last_out_cyc >= 0)
        `CHECK(cyc - last_out_cyc == period_exp, $sformatf("loopback period %0d", cyc - last_out_cyc))
      last_out_cyc = cyc; have_x = 0; n_loop++;
    end
    // adder test program: running sum of the sampling index (128-sample chunks)
    if (!d2a_cs_n && add_on) begin
      if (int'(add_acc) + add_idx > 255) n_add_ovf++;
      add_acc = add_acc + 8'(add_idx);
      `CHECK(d2a_data == add_acc, $sformatf("adder output %0d expected %0d", d2a_data, add_acc))
      if (last_out_cyc >= 0)
        `CHECK(cyc - last_out_cyc == period_exp, $sformatf("adder period %0d", cyc - last_out_cyc))
      last_out_cyc = cyc; n_add++;
      if (add_idx >= 127) begin add_idx = 0; n_add_restart++; end else add_idx++;
    end
    // storage ramp test program: the stored "sample" is the low address bits
    if (!d2a_cs_n && model_on && ramp_on) begin x_last = 8'(m_samp); have_x = 1; end
    if (!d2a_cs_n && model_on) begin
      samples++;
      if (stable >= 2 && last_out_cyc >= 0)
        `CHECK(cyc - last_out_cyc == period_exp, $sformatf("sample period %0d", cyc - last_out_cyc))
      if (period_exp == 48) n_fast++;
      last_out_cyc = cyc; stable++;
      last = 128 * (int'(buf_size_sel) + 1) - 1;
      `CHECK(have_x, "A2D read before output")
      half[m_b][m_samp] = x_last; hvalid[m_b][m_samp] = 1;
      expv = 0; yv = 1; sfull = 0; y = 0;
      if (pass_orig_sw) expv += int'(x_last);
      if (shift_sw) begin
        a = (m_shift >> 6) % 2048;
        y = int'(half[1 - m_b][a]); yv = hvalid[1 - m_b][a];
        expv += y; sfull = (a >= last);
      end
      if (pass_orig_sw && !shift_sw) n_pass++;
      if (shift_sw && !pass_orig_sw) n_shift++;
      if (shift_sw && pass_orig_sw) begin n_mix++; if (int'(x_last) + y > 255) n_mix_ovf++; end
      if (yv) begin
        `CHECK(d2a_data == 8'(expv) && dac_out == 8'(expv),
               $sformatf("output %0d expected %0d (sample %0d)", d2a_data, 8'(expv), samples))
        if (shift_sw) n_checked_shift++;
        if (ramp_on) n_ramp++;
      end
      have_x = 0;
      if (m_samp >= last) begin
        n_swap++; if (last == 2047) n_swap2048++;
        m_b = 1 - m_b; m_samp = 0; m_shift = 0;
      end else begin
        m_samp++;
        if (shift_sw && sfull) begin m_shift = 0; n_wrap++; end
        else m_shift = (m_shift + int'(pitch)) % (1 << 17);
      end
    end
  end

  // wait for n output samples, then a quiet point in the sampling period
  task automatic samples_n(int n);
    int s0;
    s0 = samples;
    while (samples < s0 + n) @(posedge clk);
    repeat (16) @(posedge clk);
  endtask

  task automatic set_mode(bit p, bit s);
    pass_orig_sw = p; shift_sw = s; stable = 0;
  endtask

  initial begin
    reset_n = 0; pitch_up = 0; pitch_down = 0; shift_sw = 0; pass_orig_sw = 1;
    fs_sel = 0; buf_size_sel = 4'd0; prog_sel = 1;
    repeat (10) @(posedge clk);
    reset_n = 1;                             // converter loopback test program
    repeat (4) @(posedge clk);
    loop_on = 1;
    while (n_loop < 100) @(posedge clk);
    loop_on = 0; last_out_cyc = -1;
    reset_n = 0; prog_sel = 2;               // storage ramp test program
    repeat (10) @(posedge clk);
    reset_n = 1;
    repeat (4) @(posedge clk);
    set_mode(0, 1); ramp_on = 1; model_on = 1;
    samples_n(400);
    pitch_up = 1;                            // one press: pitch 1.0 + 1/64
    while (pitch == 8'h40) @(posedge clk);
    pitch_up = 0;
    samples_n(700);
    model_on = 0; ramp_on = 0; last_out_cyc = -1; have_x = 0;
    reset_n = 0; prog_sel = 3;               // adder test program
    repeat (10) @(posedge clk);
    reset_n = 1;
    repeat (4) @(posedge clk);
    add_on = 1;
    while (n_add < 300) @(posedge clk);
    add_on = 0; last_out_cyc = -1;
    reset_n = 0; prog_sel = 0;               // the pitch shifter program
    repeat (10) @(posedge clk);
    m_b = 0; m_samp = 0; m_shift = 0; set_mode(1, 0);
    reset_n = 1;
    repeat (4) @(posedge clk);
    `CHECK(pitch == 8'h40, "pitch 1.0 after reset")
    model_on = 1;

    samples_n(300);                          // original signal only
    set_mode(0, 1); samples_n(400);          // shifted only, pitch 1.0 (pure delay)
    set_mode(1, 1); samples_n(300);          // mix
    set_mode(0, 1);

    pitch_up = 1;                            // raise the pitch: hold the button
    while (pitch < 8'h46) @(posedge clk);
    repeat (20) @(posedge clk);
    pitch_up = 0;
    samples_n(600);

    pitch_down = 1;                          // lower the pitch below 1.0
    while (pitch > 8'h3A) @(posedge clk);
    repeat (20) @(posedge clk);
    pitch_down = 0;
    samples_n(600);

    set_mode(1, 1); samples_n(300);          // mix at lowered pitch

    fs_sel = 1; period_exp = 48; stable = 0; // 19.2 kHz
    set_mode(0, 1); samples_n(300);

    buf_size_sel = 4'd15; stable = 0;        // 2048-sample buffers
    samples_n(4200);

    `CHECK(pitch == 8'h3A, "final pitch")
    `CHECK(n_swap > 0, "buffer swaps happened")
    `CHECK(n_swap2048 >= 2, "2048-sample buffer swaps happened")
    `CHECK(n_wrap > 0, "shifting counter restarts happened")
    `CHECK(n_pass > 0 && n_shift > 0 && n_mix > 0, "all output modes used")
    `CHECK(n_mix_ovf > 0, "mix overflow (wrap-around) happened")
    `CHECK(n_up >= 7 && n_down >= 12, "pitch up and down steps happened")
    `CHECK(repeat_checks > 0, "auto-repeat intervals measured")
    `CHECK(n_fast > 0, "high sampling rate used")
    `CHECK(n_busy > 0, "control unit waited on A2D STATUS")
    `CHECK(n_checked_shift > 1000, "shifted outputs checked")
    `CHECK(n_loop >= 100, "loopback program ran")
    `CHECK(n_ramp > 500, "ramp test outputs checked")
    `CHECK(n_add >= 300 && n_add_restart >= 2 && n_add_ovf > 0, "adder test ran, restarted and overflowed")
    $display("samples=%0d swaps=%0d swaps2048=%0d wraps=%0d pass=%0d shift=%0d mix=%0d mix_ovf=%0d up=%0d down=%0d repeat=%0d fast=%0d busy=%0d loop=%0d ramp=%0d add=%0d conversions=%0d",
             samples, n_swap, n_swap2048, n_wrap, n_pass, n_shift, n_mix, n_mix_ovf, n_up, n_down,
             repeat_checks, n_fast, n_busy, n_loop, n_ramp, n_add, conversions);
    `TB_FINISH
  end
endmodule
