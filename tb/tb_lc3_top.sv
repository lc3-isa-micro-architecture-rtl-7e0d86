// tb_lc3_top: end-to-end test of the LC-3 core with its memory, run with a
// three-cycle memory so that every memory state waits on R = 0.
//
// Part 1 replays the worked examples of the instruction walk-through: NOT of
// 1100101011110000, ADD with three registers and with imm5 = -2, A - B by
// NOT / ADD #1 / ADD, LD R2 at x2019, LDI R3 at x4A1C through the pointer at x49E9,
// LDR R1 with BaseR = x0005, LEA R5 at x0200, plus AND and the three stores.
// Part 2 runs random programs of the ten implemented opcodes (and some that are not
// implemented, which must act as no-ops) against an instruction-level reference
// model kept in this testbench: after every instruction the registers, condition
// codes, PC and any stored word are compared, and the instruction's cycle count is
// compared with the state sequence of its opcode.  Each mechanism (each opcode, the
// R = 0 wait, each condition code, a no-op opcode) is counted and must occur.
module tb_lc3_top;
  import lc3_pkg::*;
  localparam int unsigned LAT = 3;

  logic   clk = 0, rst, load_en, mio_en, r_w, mem_r;
  word_t  reset_pc, load_addr, load_data, peek_addr, peek_data;
  word_t  pc, ir, mar, mdr, psr, bus, bus_addr, bus_wdata;
  word_t  regs [8];
  state_e state;
  ctrl_t  ctrl;
  int checks = 0, failures = 0;
  longint cycle = 0;

  // reference model state
  word_t m_reg [8];
  word_t m_pc;
  logic [2:0] m_cc;
  word_t m_mem [word_t];

  lc3_top #(.MEM_LATENCY(LAT)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // mechanism counters
  int n_op [16];
  int n_wait = 0, n_n = 0, n_z = 0, n_p = 0, n_write = 0;
  always @(posedge clk) if (!rst) begin
    if (state == S_DECODE) n_op[ir[15:12]]++;
    if (ctrl.mio_en && !mem_r) n_wait++;
    if (ctrl.mio_en && ctrl.r_w && mem_r) n_write++;
    if (ctrl.ld_cc) begin
      if (bus[15]) n_n++; else if (bus == 0) n_z++; else n_p++;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // Writes one word through the harness port and into the reference model.
  task automatic load(input word_t a, input word_t d);
    load_en = 1; load_addr = a; load_data = d;
    m_mem[a] = d;
    @(posedge clk); #1 load_en = 0;
  endtask

  task automatic peek_check(input word_t a, input word_t exp, input string what);
    peek_addr = a;
    #1;
    check(peek_data == exp, $sformatf("%s: M[%h] = %h expected %h", what, a, peek_data, exp));
  endtask

  // Background contents of the whole memory, written once at the start.
  function automatic word_t init_word(input word_t a);
    return word_t'((32'(a) * 32'd40503 + 32'd12345) ^ (32'(a) >> 3));
  endfunction

  // Reset with the PC at start, then run n instructions (n returns to state 18).
  task automatic run(input word_t start, input int n);
    reset_pc = start; rst = 1;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      while (state != S_FETCH1) begin @(posedge clk); #1; end
    end
  endtask

  // ---------------- instruction-level reference model ----------------

  function automatic word_t mread(input word_t a);
    return m_mem.exists(a) ? m_mem[a] : init_word(a);
  endfunction

  function automatic word_t sx(input word_t v, input int n);
    int x = int'(v) % (1 << n);
    if (x >= (1 << (n - 1))) x -= (1 << n);
    return word_t'(x);
  endfunction

  function automatic void setcc(input word_t v);
    m_cc = (int'(v) >= 32768) ? 3'b100 : (v == 0) ? 3'b010 : 3'b001;
  endfunction

  // Executes one instruction; returns the address written (or -1) and the expected
  // cycle count.
  task automatic model_step(output int wr_addr, output int cycles);
    word_t i, b, ea;
    logic [2:0] d, s1;
    i = mread(m_pc);
    m_pc = m_pc + 1;
    d = i[11:9]; s1 = i[8:6];
    b = i[5] ? sx(i, 5) : m_reg[i[2:0]];
    wr_addr = -1;
    cycles = 4 + (LAT - 1);                  // 18, 33 (waits), 35, 32
    case (i[15:12])
      4'b0001: begin m_reg[d] = m_reg[s1] + b; setcc(m_reg[d]); cycles += 1; end
      4'b0101: begin m_reg[d] = m_reg[s1] & b; setcc(m_reg[d]); cycles += 1; end
      4'b1001: begin m_reg[d] = ~m_reg[s1];    setcc(m_reg[d]); cycles += 1; end
      4'b1110: begin m_reg[d] = m_pc + sx(i, 9); cycles += 1; end
      4'b0010: begin m_reg[d] = mread(m_pc + sx(i, 9)); setcc(m_reg[d]); cycles += 3 + LAT - 1; end
      4'b0110: begin m_reg[d] = mread(m_reg[s1] + sx(i, 6)); setcc(m_reg[d]); cycles += 3 + LAT - 1; end
      4'b1010: begin m_reg[d] = mread(mread(m_pc + sx(i, 9))); setcc(m_reg[d]); cycles += 5 + 2 * (LAT - 1); end
      4'b0011: begin ea = m_pc + sx(i, 9);         m_mem[ea] = m_reg[d]; wr_addr = int'(ea); cycles += 3 + LAT - 1; end
      4'b0111: begin ea = m_reg[s1] + sx(i, 6);    m_mem[ea] = m_reg[d]; wr_addr = int'(ea); cycles += 3 + LAT - 1; end
      4'b1011: begin ea = mread(m_pc + sx(i, 9));  m_mem[ea] = m_reg[d]; wr_addr = int'(ea); cycles += 5 + 2 * (LAT - 1); end
      default: ;                               // not implemented: no-op
    endcase
  endtask

  function automatic word_t rand_instr();
    logic [3:0] ops [14] = '{4'h1, 4'h5, 4'h9, 4'hE, 4'h2, 4'h6, 4'hA, 4'h3, 4'h7, 4'hB,
                             4'h1, 4'h5, 4'h0, 4'hF};
    return {ops[$urandom_range(0, 13)], 12'($urandom)};
  endfunction

  task automatic random_program(input int n_words, input int n_exec);
    word_t base;
    longint t0;
    int wa, cyc;
    base = 16'($urandom);
    for (int k = 0; k < n_words; k++) load(base + word_t'(k), rand_instr());
    // the model starts from the reset state: all registers zero, CC = Z
    for (int k = 0; k < 8; k++) m_reg[k] = '0;
    m_cc = 3'b010; m_pc = base;
    reset_pc = base; rst = 1;
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < n_exec; n++) begin
      t0 = cycle;
      model_step(wa, cyc);
      @(posedge clk); #1;
      while (state != S_FETCH1) begin @(posedge clk); #1; end
      check(int'(cycle - t0) == cyc, $sformatf("instr %h took %0d cycles, expected %0d", ir, cycle - t0, cyc));
      for (int k = 0; k < 8; k++)
        check(regs[k] == m_reg[k], $sformatf("R%0d = %h expected %h after %h", k, regs[k], m_reg[k], ir));
      check(psr[2:0] == m_cc, $sformatf("CC %b expected %b after %h", psr[2:0], m_cc, ir));
      check(pc == m_pc, $sformatf("PC %h expected %h", pc, m_pc));
      if (wa >= 0) peek_check(word_t'(wa), m_mem[word_t'(wa)], "store");
    end
  endtask

  initial begin
    rst = 1; load_en = 0; load_addr = 0; load_data = 0; peek_addr = 0; reset_pc = 0;
    @(posedge clk); #1;
    // background fill of all 2^16 words (not recorded in m_mem: mread recomputes it)
    for (int a = 0; a < 65536; a++) begin
      load_en = 1; load_addr = word_t'(a); load_data = init_word(word_t'(a));
      @(posedge clk); #1;
    end
    load_en = 0;

    // NOT: R5 = 1100101011110000, R3 <- NOT(R5)
    load(16'h3000, 16'b0010_101_000000010);   // LD  R5, #2   (x3003)
    load(16'h3001, 16'b1001_011_101_111111);  // NOT R3, R5
    load(16'h3003, 16'b1100101011110000);
    run(16'h3000, 2);
    check(regs[3] == 16'b0011010100001111, "NOT example R3");
    check(regs[5] == 16'b1100101011110000, "NOT example R5 unchanged");
    check(psr[2:0] == 3'b001, "NOT example CC = P");

    // ADD R1 <- R4 + R5 and R1 <- R4 + (-2)
    load(16'h3010, 16'b0010_100_000000100);   // LD  R4, #4   (x3015)
    load(16'h3011, 16'b0010_101_000000100);   // LD  R5, #4   (x3016)
    load(16'h3012, 16'b0001_001_100_000_101); // ADD R1, R4, R5
    load(16'h3013, 16'b0001_010_100_1_11110); // ADD R2, R4, #-2
    load(16'h3015, 16'd1000);
    load(16'h3016, 16'd234);
    run(16'h3010, 4);
    check(regs[1] == 16'd1234, "ADD 3-register");
    check(regs[2] == 16'd998, "ADD imm5 = -2");

    // A - B: A in R0, B in R1; R1 <- NOT R1; R2 <- R1 + 1; R1 <- R0 + R2
    load(16'h3020, 16'b0010_000_000000101);   // LD  R0, #5 (x3026)
    load(16'h3021, 16'b0010_001_000000101);   // LD  R1, #5 (x3027)
    load(16'h3022, 16'b1001_001_001_111111);  // NOT R1, R1
    load(16'h3023, 16'b0001_010_001_1_00001); // ADD R2, R1, #1
    load(16'h3024, 16'b0001_001_000_0_00_010);// ADD R1, R0, R2
    load(16'h3026, 16'd300);
    load(16'h3027, 16'd500);
    run(16'h3020, 5);
    check(regs[1] == 16'hFF38, "A - B = 300 - 500");
    check(psr[2:0] == 3'b100, "A - B negative: CC = N");

    // LD R2, x0AF at x2019
    load(16'h2019, 16'b0010_010_010101111);
    load(16'h20C9, 16'h0005);
    run(16'h2019, 1);
    check(regs[2] == 16'h0005, "LD example R2");
    check(pc == 16'h201A, "LD example PC");
    check(mar == 16'h20C9, "LD example MAR");

    // LDI R3 at x4A1C: M[x49E9] = xFFFF, M[xFFFF] = x0005
    load(16'h4A1C, 16'b1010_011_111001100);
    load(16'h49E9, 16'hFFFF);
    load(16'hFFFF, 16'h0005);
    run(16'h4A1C, 1);
    check(regs[3] == 16'h0005, "LDI example R3");
    check(mar == 16'hFFFF, "LDI example MAR");

    // LDR R1, R2, x0D at x0200 with R2 = x0005 (set by LD at x01FF)
    load(16'h01FF, 16'b0010_010_000010000);   // LD R2, #16 (x0210)
    load(16'h0210, 16'h0005);
    load(16'h0200, 16'b0110_001_010_001101);
    load(16'h0012, 16'hABCD);
    run(16'h01FF, 2);
    check(regs[1] == 16'hABCD, "LDR example R1");
    check(psr[2:0] == 3'b100, "LDR example CC = N");

    // LEA R5 at x0200, offset -3
    load(16'h0200, 16'b1110_101_111111101);
    run(16'h0200, 1);
    check(regs[5] == 16'h01FE, "LEA example R5");
    check(psr[2:0] == 3'b010, "LEA leaves CC alone");

    // AND and the stores
    load(16'h5000, 16'b0010_001_000001000);   // LD  R1, #8   (x5009) = xF0F0
    load(16'h5001, 16'b0101_010_001_1_01100); // AND R2, R1, #12 -> x0000
    load(16'h5002, 16'b0101_011_001_0_00_001);// AND R3, R1, R1  -> xF0F0
    load(16'h5003, 16'b0011_011_000000110);   // ST  R3, #6   -> x500A
    load(16'h5004, 16'b1110_100_000000110);   // LEA R4, #6   -> x500B
    load(16'h5005, 16'b0111_001_100_000001);  // STR R1, R4, #1 -> x500C
    load(16'h5006, 16'b1011_100_000000110);   // STI R4, #6 via x500D -> M[x6000] = x500B
    load(16'h5007, 16'b0000_111_000000101);   // BR (not implemented): no-op
    load(16'h5009, 16'hF0F0);
    load(16'h500A, 16'h0000);
    load(16'h500C, 16'h0000);
    load(16'h500D, 16'h6000);
    load(16'h6000, 16'h0000);
    run(16'h5000, 8);
    check(regs[2] == 16'h0000, "AND imm");
    check(regs[3] == 16'hF0F0, "AND reg");
    peek_check(16'h500A, 16'hF0F0, "ST");
    peek_check(16'h500C, 16'hF0F0, "STR");
    peek_check(16'h6000, 16'h500B, "STI");
    check(pc == 16'h5008, "no-op opcode advances PC only");

    // Part 2: random programs against the reference model
    for (int p = 0; p < 20; p++) random_program(48, 60);

    foreach (n_op[k]) if (k inside {1, 2, 3, 5, 6, 7, 9, 10, 11, 14})
      check(n_op[k] > 0, $sformatf("opcode %0d never executed", k));
    check(n_op[0] + n_op[15] > 0, "no-op opcode never executed");
    check(n_wait > 0, "memory wait (R = 0) never happened");
    check(n_write > 0, "memory write never happened");
    check(n_n > 0 && n_z > 0 && n_p > 0, "a condition code was never set");
    $display("mechanisms: waits=%0d writes=%0d N=%0d Z=%0d P=%0d ADD=%0d AND=%0d NOT=%0d LEA=%0d LD=%0d LDR=%0d LDI=%0d ST=%0d STR=%0d STI=%0d",
             n_wait, n_write, n_n, n_z, n_p, n_op[1], n_op[5], n_op[9], n_op[14], n_op[2], n_op[6],
             n_op[10], n_op[3], n_op[7], n_op[11]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
