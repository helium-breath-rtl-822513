// ps_pkg: types, constants and the microprogram shared by the pitch shifter.
//
// Microinstruction word (16 bits), as defined for the microprogrammed control unit:
//   conditional branch    0ccc xxxx aaaaaaaa   c = status select, a = jump address
//   unconditional branch  0111 xxxx aaaaaaaa   (select 7 is the constant-true mux input)
//   assertion             1sss ssss ssssssss   s = signals asserted for one cycle
// The encoding above follows the control unit's instruction set. The meaning of each
// assertion bit, the status-input numbering and the microprogram itself are this
// design's own: they implement the sample / store / stretch-or-squish / output loop
// with two buffers that swap roles when the sampling buffer is full.
package ps_pkg;

  localparam int unsigned UADDR_W = 8;     // sequencer width (two 4-bit counters)
  localparam int unsigned PSEL_W  = 2;     // program-select PROM address bits

  // Control signals in assertion-instruction bit order (bit 0 is the LSB).
  typedef struct packed {
    logic spare;             // bit 14
    logic ramp_drive;        // bit 13: low address bits onto the bus (tests)
    logic d2a_latch;         // bit 12: open the D2A input latch
    logic acc_clear;         // bit 11: clear the signal accumulator
    logic acc_load;          // bit 10: accumulator <= accumulator + bus
    logic shift_buf;         // bit 9 : address the shifting buffer (other half of SRAM)
    logic shift_count;       // bit 8 : SRAM address from the shifting counter
    logic swap_buf;          // bit 7 : toggle BufSel
    logic clear_shift;       // bit 6 : clear the shifting counter
    logic clear_samp;        // bit 5 : clear the sampling counter
    logic count;             // bit 4 : advance both address counters
    logic sram_oe;           // bit 3 : SRAM read onto the bus
    logic sram_we;           // bit 2 : SRAM write from the bus
    logic a2d_read;          // bit 1 : A2D read cycle (drives the bus)
    logic a2d_start;         // bit 0 : A2D conversion start
  } ctrl_t;

  // Active-low chip pins derived from the controls by the assertion logic.
  typedef struct packed {
    logic a2d_w_n;
    logic a2d_cs_n;
    logic sram_cs_n;
    logic sram_we_n;
    logic sram_oe_n;
    logic d2a_cs_n;
  } pins_t;

  localparam pins_t PINS_IDLE = '1;

  // Assertion bit masks.
  localparam logic [14:0] A2D_START   = 15'h0001;
  localparam logic [14:0] A2D_READ    = 15'h0002;
  localparam logic [14:0] SRAM_WE     = 15'h0004;
  localparam logic [14:0] SRAM_OE     = 15'h0008;
  localparam logic [14:0] COUNT       = 15'h0010;
  localparam logic [14:0] CLEAR_SAMP  = 15'h0020;
  localparam logic [14:0] CLEAR_SHIFT = 15'h0040;
  localparam logic [14:0] SWAP_BUF    = 15'h0080;
  localparam logic [14:0] SHIFT_COUNT = 15'h0100;
  localparam logic [14:0] SHIFT_BUF   = 15'h0200;
  localparam logic [14:0] ACC_LOAD    = 15'h0400;
  localparam logic [14:0] ACC_CLEAR   = 15'h0800;
  localparam logic [14:0] D2A_LATCH   = 15'h1000;
  localparam logic [14:0] RAMP_DRIVE  = 15'h2000;
  localparam logic [14:0] NOTHING     = 15'h0000;

  // Status inputs of the condition multiplexer (input 7 is tied true).
  localparam logic [2:0] ST_SAMPLING  = 3'd0;  // sampling-rate square wave
  localparam logic [2:0] ST_A2D_BUSY  = 3'd1;  // AD670 STATUS (conversion running)
  localparam logic [2:0] ST_FULL      = 3'd2;  // full detector
  localparam logic [2:0] ST_SHIFT     = 3'd3;  // Shift? switch
  localparam logic [2:0] ST_PASSORIG  = 3'd4;  // PassOrig? switch
  localparam logic [2:0] ST_CARRY     = 3'd5;  // accumulator adder carry
  localparam logic [2:0] ST_SAMPLING_N = 3'd6; // SAMPLING inverted
  localparam logic [2:0] ST_TRUE      = 3'd7;

  localparam logic [15:0] RESET_WORD  = 16'h7000;  // JMP 0

  function automatic logic [15:0] u_assert(logic [14:0] s);
    return {1'b1, s};
  endfunction

  function automatic logic [15:0] u_cjmp(logic [2:0] c, logic [7:0] a);
    return {1'b0, c, 4'b0000, a};
  endfunction

  function automatic logic [15:0] u_jmp(logic [7:0] a);
    return u_cjmp(ST_TRUE, a);
  endfunction

  // Microprogram labels.
  localparam logic [7:0] L_INIT     = 8'd0;
  localparam logic [7:0] L_WAIT_HI  = 8'd1;
  localparam logic [7:0] L_WAIT_LO  = 8'd2;
  localparam logic [7:0] L_GO       = 8'd4;
  localparam logic [7:0] L_CONV     = 8'd8;
  localparam logic [7:0] L_ORIG     = 8'd12;
  localparam logic [7:0] L_SHIFTCHK = 8'd13;
  localparam logic [7:0] L_DOSHIFT  = 8'd15;
  localparam logic [7:0] L_OUT      = 8'd18;
  localparam logic [7:0] L_NEXT     = 8'd21;
  localparam logic [7:0] L_WRAP     = 8'd23;
  localparam logic [7:0] L_SWAP     = 8'd28;
  localparam int unsigned UPROG_LEN = 30;

  // The pitch shifter microprogram. Every assertion takes effect in the clock
  // cycle after its instruction (the assertion logic registers it), so a branch
  // on Full placed right after an instruction that selects the shifting counter
  // tests the shifting address, and one placed after any other instruction tests
  // the sampling address. The A2D STATUS input passes a two-flop synchronizer,
  // hence three idle instructions before it is tested.
  function automatic logic [15:0] microprogram(int unsigned a);
    case (a)
      // power-up / reset
      0:  return u_assert(CLEAR_SAMP | CLEAR_SHIFT | ACC_CLEAR);
      // wait for a rising edge of SAMPLING
      1:  return u_cjmp(ST_SAMPLING, L_WAIT_HI);   // stay while high
      2:  return u_cjmp(ST_SAMPLING_N, L_WAIT_LO); // stay while low
      3:  return u_assert(NOTHING);                // rising edge seen
      // start a conversion, clear the mixer
      4:  return u_assert(A2D_START | ACC_CLEAR);
      5:  return u_assert(NOTHING);
      6:  return u_assert(NOTHING);
      7:  return u_assert(NOTHING);
      8:  return u_cjmp(ST_A2D_BUSY, L_CONV);      // wait for end of conversion
      // store the sample in the sampling buffer, optionally mix it in
      9:  return u_cjmp(ST_PASSORIG, L_ORIG);
      10: return u_assert(A2D_READ | SRAM_WE);
      11: return u_jmp(L_SHIFTCHK);
      12: return u_assert(A2D_READ | SRAM_WE | ACC_LOAD);
      // read the shifting buffer at the shifting counter and mix it in
      13: return u_cjmp(ST_SHIFT, L_DOSHIFT);
      14: return u_jmp(L_OUT);
      15: return u_assert(SHIFT_COUNT | SHIFT_BUF | SRAM_OE | ACC_LOAD);
      16: return u_cjmp(ST_FULL, L_WRAP);         // shifting address at the end?
      17: return u_jmp(L_OUT);
      // output, then end of sample: swap when the sampling buffer is full
      18: return u_assert(D2A_LATCH);
      19: return u_cjmp(ST_FULL, L_SWAP);         // sampling address at the end?
      20: return u_jmp(L_NEXT);
      21: return u_assert(COUNT);
      22: return u_jmp(L_WAIT_HI);
      // same, but the shifting counter restarts at the buffer start; the idle
      // instruction keeps the output at the same point of the sampling period
      23: return u_assert(NOTHING);
      24: return u_assert(D2A_LATCH);
      25: return u_cjmp(ST_FULL, L_SWAP);
      26: return u_assert(COUNT | CLEAR_SHIFT);
      27: return u_jmp(L_WAIT_HI);
      // buffers change roles; both counters restart
      28: return u_assert(SWAP_BUF | CLEAR_SAMP | CLEAR_SHIFT);
      29: return u_jmp(L_WAIT_HI);
      default: return RESET_WORD;
    endcase
  endfunction

  // Converter loopback test program: each sampling period, convert and send the
  // A2D value through the accumulator to the D2A; the storage unit is not used.
  function automatic logic [15:0] loopback_program(int unsigned a);
    case (a)
      0:  return u_assert(ACC_CLEAR);
      1:  return u_cjmp(ST_SAMPLING, 8'd1);
      2:  return u_cjmp(ST_SAMPLING_N, 8'd2);
      3:  return u_assert(A2D_START | ACC_CLEAR);
      4:  return u_assert(NOTHING);
      5:  return u_assert(NOTHING);
      6:  return u_assert(NOTHING);
      7:  return u_cjmp(ST_A2D_BUSY, 8'd7);
      8:  return u_assert(A2D_READ | ACC_LOAD);
      9:  return u_assert(D2A_LATCH);
      10: return u_jmp(8'd1);
      default: return RESET_WORD;
    endcase
  endfunction

  // Storage test program: instead of A2D samples, the low 8 bits of the SRAM
  // address are driven onto the bus and stored, so the sampling buffer fills with
  // a ramp; the shifting buffer is read back at the pitch multiplier's rate and
  // sent to the D2A, exactly as in the pitch shifter program.
  function automatic logic [15:0] ramp_program(int unsigned a);
    case (a)
      0:  return u_assert(CLEAR_SAMP | CLEAR_SHIFT | ACC_CLEAR);
      1:  return u_cjmp(ST_SAMPLING, 8'd1);
      2:  return u_cjmp(ST_SAMPLING_N, 8'd2);
      3:  return u_assert(ACC_CLEAR);
      4:  return u_assert(RAMP_DRIVE | SRAM_WE);                      // store the ramp
      5:  return u_assert(SHIFT_COUNT | SHIFT_BUF | SRAM_OE | ACC_LOAD);
      6:  return u_cjmp(ST_FULL, 8'd12);                             // shifting index at end?
      7:  return u_assert(D2A_LATCH);
      8:  return u_cjmp(ST_FULL, 8'd16);                             // sampling index at end?
      9:  return u_assert(COUNT);
      10: return u_jmp(8'd1);
      12: return u_assert(D2A_LATCH);
      13: return u_cjmp(ST_FULL, 8'd16);
      14: return u_assert(COUNT | CLEAR_SHIFT);
      15: return u_jmp(8'd1);
      16: return u_assert(SWAP_BUF | CLEAR_SAMP | CLEAR_SHIFT);
      17: return u_jmp(8'd1);
      default: return RESET_WORD;
    endcase
  endfunction

  // Adder test program: isolates the accumulator from the A2D and the SRAM. Each
  // sampling period the low address bits (the sampling index) are added to the
  // accumulator, which is never cleared, and the running sum goes to the D2A.
  function automatic logic [15:0] adder_program(int unsigned a);
    case (a)
      0: return u_assert(CLEAR_SAMP | ACC_CLEAR);
      1: return u_cjmp(ST_SAMPLING, 8'd1);
      2: return u_cjmp(ST_SAMPLING_N, 8'd2);
      3: return u_assert(RAMP_DRIVE | ACC_LOAD);                       // acc += index
      4: return u_assert(D2A_LATCH);
      5: return u_cjmp(ST_FULL, 8'd8);
      6: return u_assert(COUNT);
      7: return u_jmp(8'd1);
      8: return u_assert(CLEAR_SAMP);                                  // index back to 0
      9: return u_jmp(8'd1);
      default: return RESET_WORD;
    endcase
  endfunction

  // Contents of the whole microcode store: program p at addresses p*256 ...
  // p*256+255. Program 0 is the pitch shifter, program 1 the converter
  // loopback test, program 2 the storage ramp test, program 3 the adder test.
  function automatic logic [15:0] program_word(int unsigned p, int unsigned a);
    case (p)
      0:       return microprogram(a);
      1:       return loopback_program(a);
      2:       return ramp_program(a);
      3:       return adder_program(a);
      default: return RESET_WORD;
    endcase
  endfunction

endpackage
