// synchronizer: input conditioning for all asynchronous inputs.
//
// Every switch and button (and /RESET, the two program select switches and the
// A2D STATUS line) passes STAGES flip-flops before it reaches the rest of the
// design. The synchronized /RESET becomes the design's synchronous, active-high
// reset. PitchUp and PitchDown are also turned into pulses: one clock-wide
// pulse when a button is pressed, then one more on every repeat_tick for as
// long as it stays held, so the pitch moves slowly and controllably. If both
// buttons are held, neither produces pulses. Synchronizing and pulse conversion
// follow the design description; the flop count, the press-then-repeat
// behaviour and the both-held rule are this design's choices.
//
// Timing: a level change reaches the *_s outputs STAGES clocks later; a press
// gives its first pulse STAGES+1 clocks after the input rises.
module synchronizer #(
  parameter int unsigned STAGES = 2
) (
  input  logic       clk,
  input  logic       reset_n_async,
  input  logic       pitch_up_async,
  input  logic       pitch_down_async,
  input  logic       shift_async,
  input  logic       pass_orig_async,
  input  logic       fs_sel_async,
  input  logic [3:0] buf_size_async,
  input  logic       a2d_status_async,
  input  logic [1:0] prog_sel_async,
  input  logic       repeat_tick,
  output logic       rst,
  output logic       pitch_up_pulse,
  output logic       pitch_down_pulse,
  output logic       shift_s,
  output logic       pass_orig_s,
  output logic       fs_sel_s,
  output logic [3:0] buf_size_s,
  output logic       a2d_status_s,
  output logic [1:0] prog_sel_s
);
  localparam int unsigned N = 13;   // number of synchronized bits

  logic [N-1:0] async_in;
  logic [N-1:0] sync_q [STAGES];
  logic [N-1:0] s;

  assign async_in = {prog_sel_async, a2d_status_async, buf_size_async, fs_sel_async, pass_orig_async,
                     shift_async, pitch_down_async, pitch_up_async, reset_n_async};

  always_ff @(posedge clk) begin
    sync_q[0] <= async_in;
    for (int i = 1; i < STAGES; i++) sync_q[i] <= sync_q[i-1];
  end
  assign s = sync_q[STAGES-1];

  assign rst          = ~s[0];
  assign shift_s      = s[3];
  assign pass_orig_s  = s[4];
  assign fs_sel_s     = s[5];
  assign buf_size_s   = s[9:6];
  assign a2d_status_s = s[10];
  assign prog_sel_s   = s[12:11];

  logic up_q, down_q;
  logic up_held, down_held;

  assign up_held   = s[1] & ~s[2];
  assign down_held = s[2] & ~s[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      up_q             <= 1'b0;
      down_q           <= 1'b0;
      pitch_up_pulse   <= 1'b0;
      pitch_down_pulse <= 1'b0;
    end else begin
      up_q             <= up_held;
      down_q           <= down_held;
      pitch_up_pulse   <= up_held   & (~up_q   | repeat_tick);
      pitch_down_pulse <= down_held & (~down_q | repeat_tick);
    end
  end
endmodule
