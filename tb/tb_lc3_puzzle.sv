// tb_lc3_puzzle: the self-modifying-code exercise, run on lc3_top at its default
// parameters (2^16-word memory, single-cycle memory access).
//
// The program adds A to the opcode field of its own first instruction and B to
// that of its second, wherever it is placed.  A and B are small numbers (0..15)
// held in the two words just before the first instruction.  Program, relative to
// P = address of instr_0:
//
//   P-2: A         P-1: B
//   P+0:  LD  R0, #-1     R0 <- M[P]     (instr_0 itself)
//   P+1:  LD  R1, #-4     R1 <- A
//   P+2..P+13: ADD R1, R1, R1  (x12)     R1 <- A << 12
//   P+14: ADD R0, R0, R1
//   P+15: ST  R0, #-16    M[P]   <- instr_0 with opcode + A
//   P+16: LD  R0, #-16    R0 <- M[P+1]   (instr_1)
//   P+17: LD  R1, #-19    R1 <- B
//   P+18..P+29: ADD R1, R1, R1 (x12)
//   P+30: ADD R0, R0, R1
//   P+31: ST  R0, #-31    M[P+1] <- instr_1 with opcode + B
//
// Only PC-relative addressing is used, so the program runs unchanged at any
// address.  The test places it at several random addresses, checks both altered
// words (opcode field + A or B mod 16, other 12 bits untouched), the untouched
// neighbours, and the cycle count: 4 LD x 7 + 2 ST x 7 + 26 ADD x 5 = 172 cycles.
module tb_lc3_puzzle;
  import lc3_pkg::*;
  logic   clk = 0, rst, load_en, mio_en, r_w, mem_r;
  word_t  reset_pc, load_addr, load_data, peek_addr, peek_data;
  word_t  pc, ir, mar, mdr, psr, bus, bus_addr, bus_wdata;
  word_t  regs [8];
  state_e state;
  ctrl_t  ctrl;
  int checks = 0, failures = 0;

  lc3_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load(input word_t a, input word_t d);
    load_en = 1; load_addr = a; load_data = d;
    @(posedge clk); #1 load_en = 0;
  endtask

  task automatic peek(input word_t a, output word_t d);
    peek_addr = a; #1; d = peek_data;
  endtask

  function automatic word_t ld(input int r, input int off);
    return {4'b0010, 3'(r), 9'(off)};
  endfunction
  function automatic word_t st(input int r, input int off);
    return {4'b0011, 3'(r), 9'(off)};
  endfunction
  function automatic word_t add(input int d, input int s1, input int s2);
    return {4'b0001, 3'(d), 3'(s1), 3'b000, 3'(s2)};
  endfunction

  initial begin
    word_t p, w, before0, before1, guard;
    int a, b, cycles;
    word_t prog [32];
    rst = 1; load_en = 0; load_addr = 0; load_data = 0; peek_addr = 0; reset_pc = 0;
    @(posedge clk); #1;
    for (int t = 0; t < 6; t++) begin
      p = word_t'($urandom_range(2, 65500));
      a = $urandom_range(0, 15);
      b = $urandom_range(0, 15);
      prog[0] = ld(0, -1);
      prog[1] = ld(1, -4);
      for (int k = 2; k <= 13; k++) prog[k] = add(1, 1, 1);
      prog[14] = add(0, 0, 1);
      prog[15] = st(0, -16);
      prog[16] = ld(0, -16);
      prog[17] = ld(1, -19);
      for (int k = 18; k <= 29; k++) prog[k] = add(1, 1, 1);
      prog[30] = add(0, 0, 1);
      prog[31] = st(0, -31);
      load(p - 16'd2, word_t'(a));
      load(p - 16'd1, word_t'(b));
      for (int k = 0; k < 32; k++) load(p + word_t'(k), prog[k]);
      guard = 16'($urandom);
      load(p + 16'd32, guard);
      reset_pc = p; rst = 1;
      @(posedge clk); #1 rst = 0;
      cycles = 0;
      while (pc != p + 16'd32 || state != S_FETCH1) begin
        @(posedge clk); #1;
        cycles++;
      end
      before0 = prog[0]; before1 = prog[1];
      peek(p, w);
      check(w[15:12] == 4'(int'(before0[15:12]) + a), $sformatf("instr_0 opcode %h, A=%0d", w[15:12], a));
      check(w[11:0] == before0[11:0], "instr_0 operand bits unchanged");
      peek(p + 16'd1, w);
      check(w[15:12] == 4'(int'(before1[15:12]) + b), $sformatf("instr_1 opcode %h, B=%0d", w[15:12], b));
      check(w[11:0] == before1[11:0], "instr_1 operand bits unchanged");
      peek(p - 16'd2, w); check(w == word_t'(a), "A unchanged");
      peek(p - 16'd1, w); check(w == word_t'(b), "B unchanged");
      peek(p + 16'd2, w); check(w == prog[2], "instr_2 unchanged");
      peek(p + 16'd32, w); check(w == guard, "word after program unchanged");
      check(cycles == 172, $sformatf("program took %0d cycles, expected 172", cycles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
