// Checks the microcode store against hand-decoded words of all programs.
`include "tb/tb_util.svh"
module tb_microcode_rom;
  int checks = 0, failures = 0;
  logic [1:0] prog_sel; logic [7:0] addr; logic [15:0] data;
  microcode_rom dut (.*);
  task automatic expect_word(int a, logic [15:0] w, int p = 0);
    prog_sel = 2'(p); addr = 8'(a); #1;
    `CHECK(data == w, $sformatf("word %0d = %h, expected %h", a, data, w))
  endtask
  initial begin
    expect_word(0,  16'h8000 | 16'h0020 | 16'h0040 | 16'h0800); // ASSERT clears
    expect_word(1,  16'h0001);                 // CJMP SAMPLING 1
    expect_word(2,  16'h6002);                 // CJMP SAMPLING_N 2
    expect_word(3,  16'h8000);                 // ASSERT nothing
    expect_word(4,  16'h8801);                 // ASSERT A2D_START|ACC_CLEAR
    expect_word(8,  16'h1008);                 // CJMP A2D_BUSY 8
    expect_word(9,  16'h400C);                 // CJMP PASSORIG 12
    expect_word(10, 16'h8006);                 // ASSERT A2D_READ|SRAM_WE
    expect_word(13, 16'h300F);                 // CJMP SHIFT 15
    expect_word(15, 16'h8708);                 // ASSERT SHIFT_COUNT|SHIFT_BUF|SRAM_OE|ACC_LOAD
    expect_word(16, 16'h2017);                 // CJMP FULL 23
    expect_word(25, 16'h201C);                 // CJMP FULL 28
    expect_word(21, 16'h8010);                 // ASSERT COUNT
    expect_word(26, 16'h8050);                 // ASSERT COUNT|CLEAR_SHIFT
    expect_word(28, 16'h80E0);                 // ASSERT SWAP|CLEAR_SAMP|CLEAR_SHIFT
    for (int a = 30; a < 256; a++) expect_word(a, 16'h7000);  // unused: JMP 0
    // program 1: converter loopback test
    expect_word(0,  16'h8800, 1);              // ASSERT ACC_CLEAR
    expect_word(2,  16'h6002, 1);              // CJMP SAMPLING_N 2
    expect_word(3,  16'h8801, 1);              // ASSERT A2D_START|ACC_CLEAR
    expect_word(7,  16'h1007, 1);              // CJMP A2D_BUSY 7
    expect_word(8,  16'h8402, 1);              // ASSERT A2D_READ|ACC_LOAD
    expect_word(9,  16'h9000, 1);              // ASSERT D2A_LATCH
    expect_word(10, 16'h7001, 1);              // JMP 1
    for (int a = 11; a < 256; a++) expect_word(a, 16'h7000, 1);
    // program 2: storage ramp test
    expect_word(0,  16'h8860, 2);              // ASSERT clears
    expect_word(3,  16'h8800, 2);              // ASSERT ACC_CLEAR
    expect_word(4,  16'hA004, 2);              // ASSERT RAMP_DRIVE|SRAM_WE
    expect_word(5,  16'h8708, 2);              // ASSERT shifting read
    expect_word(6,  16'h200C, 2);              // CJMP FULL 12
    expect_word(8,  16'h2010, 2);              // CJMP FULL 16
    expect_word(11, 16'h7000, 2);              // gap: JMP 0
    expect_word(14, 16'h8050, 2);              // ASSERT COUNT|CLEAR_SHIFT
    expect_word(16, 16'h80E0, 2);              // ASSERT SWAP|CLEAR_SAMP|CLEAR_SHIFT
    expect_word(17, 16'h7001, 2);              // JMP 1
    for (int a = 18; a < 256; a++) expect_word(a, 16'h7000, 2);
    // program 3: adder test
    expect_word(0,  16'h8820, 3);              // ASSERT CLEAR_SAMP|ACC_CLEAR
    expect_word(3,  16'hA400, 3);              // ASSERT RAMP_DRIVE|ACC_LOAD
    expect_word(4,  16'h9000, 3);              // ASSERT D2A_LATCH
    expect_word(5,  16'h2008, 3);              // CJMP FULL 8
    expect_word(6,  16'h8010, 3);              // ASSERT COUNT
    expect_word(7,  16'h7001, 3);              // JMP 1
    expect_word(8,  16'h8020, 3);              // ASSERT CLEAR_SAMP
    expect_word(9,  16'h7001, 3);              // JMP 1
    for (int a = 10; a < 256; a++) expect_word(a, 16'h7000, 3);
    `TB_FINISH
  end
endmodule
