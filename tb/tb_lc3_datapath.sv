// tb_lc3_datapath: drives the datapath with hand-built control words, one register
// transfer per clock, and checks the registers after each.  It replays the LD
// example (LD R2, x0AF at x2019 reads x0005 from x20C9), then NOT R3, R2, then
// ADD R4, R3, #7 and a store-path transfer MDR <- R4, with a behavioural memory
// array standing in for the memory.
module tb_lc3_datapath;
  import lc3_pkg::*;
  logic clk = 0, rst;
  word_t reset_pc, mem_dout, mar, mdr, ir, pc, psr, bus;
  word_t regs [8];
  ctrl_t ctrl;
  word_t tbmem [word_t];
  int checks = 0, failures = 0;

  lc3_datapath dut (.*);
  always #5 clk = ~clk;
  assign mem_dout = tbmem.exists(mar) ? tbmem[mar] : 16'h0000;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic step(input ctrl_t c);
    ctrl = c;
    @(posedge clk); #1;
    ctrl = CTRL_IDLE;
  endtask

  task automatic fetch(input word_t exp_instr, input word_t at);
    ctrl_t c;
    c = CTRL_IDLE; c.gate_pc = 1; c.ld_mar = 1; c.ld_pc = 1; c.pcmux = PCMUX_INC;
    step(c);
    check(mar, at, "MAR <- PC"); check(pc, at + 16'd1, "PC <- PC+1");
    c = CTRL_IDLE; c.mio_en = 1; c.ld_mdr = 1;
    step(c);
    check(mdr, exp_instr, "MDR <- MEM");
    c = CTRL_IDLE; c.gate_mdr = 1; c.ld_ir = 1;
    step(c);
    check(ir, exp_instr, "IR <- MDR");
  endtask

  initial begin
    ctrl_t c;
    tbmem[16'h2019] = 16'b0010_010_010101111;   // LD R2, x0AF
    tbmem[16'h20C9] = 16'h0005;
    tbmem[16'h201A] = 16'b1001_011_010_111111;  // NOT R3, R2
    tbmem[16'h201B] = 16'b0001_100_011_1_00111; // ADD R4, R3, #7
    ctrl = CTRL_IDLE; reset_pc = 16'h2019; rst = 1;
    @(posedge clk); #1 rst = 0;
    check(pc, 16'h2019, "reset PC");
    check(psr, 16'h0002, "reset CC = Z");
    // LD R2, x0AF
    fetch(tbmem[16'h2019], 16'h2019);
    c = CTRL_IDLE; c.addr1mux = ADDR1_PC; c.addr2mux = ADDR2_OFF9; c.marmux = MARMUX_ADDR;
    c.gate_marmux = 1; c.ld_mar = 1;
    ctrl = c; #1; check(bus, 16'h20C9, "bus = PC + off9"); step(c);
    check(mar, 16'h20C9, "MAR <- PC + off9");
    c = CTRL_IDLE; c.mio_en = 1; c.ld_mdr = 1; step(c);
    check(mdr, 16'h0005, "MDR <- M[x20C9]");
    c = CTRL_IDLE; c.gate_mdr = 1; c.drmux = DRMUX_IR11; c.ld_reg = 1; c.ld_cc = 1; step(c);
    check(regs[2], 16'h0005, "R2 <- MDR");
    check(psr, 16'h0001, "CC = P");
    // NOT R3, R2
    fetch(tbmem[16'h201A], 16'h201A);
    c = CTRL_IDLE; c.sr1mux = SR1MUX_IR8; c.drmux = DRMUX_IR11; c.aluk = ALUK_NOT;
    c.gate_alu = 1; c.ld_reg = 1; c.ld_cc = 1; step(c);
    check(regs[3], 16'hFFFA, "R3 <- NOT R2");
    check(psr, 16'h0004, "CC = N");
    // ADD R4, R3, #7
    fetch(tbmem[16'h201B], 16'h201B);
    c = CTRL_IDLE; c.sr1mux = SR1MUX_IR8; c.drmux = DRMUX_IR11; c.aluk = ALUK_ADD;
    c.gate_alu = 1; c.ld_reg = 1; c.ld_cc = 1; step(c);
    check(regs[4], 16'h0001, "R4 <- R3 + 7");
    check(psr, 16'h0001, "CC = P");
    // store path: MDR <- SR with SR1MUX = IR[11:9] (R4 here), ALU pass A
    c = CTRL_IDLE; c.sr1mux = SR1MUX_IR11; c.aluk = ALUK_PASSA; c.gate_alu = 1; c.ld_mdr = 1; step(c);
    check(mdr, 16'h0001, "MDR <- R4");
    // DRMUX R7 with LEA-style transfer: R7 <- PC + off9 of ADD's IR (off9 = x0E7)
    c = CTRL_IDLE; c.addr1mux = ADDR1_PC; c.addr2mux = ADDR2_OFF9; c.marmux = MARMUX_ADDR;
    c.gate_marmux = 1; c.drmux = DRMUX_R7; c.ld_reg = 1; step(c);
    check(regs[7], 16'h201C + 16'h00E7, "R7 <- PC + off9");
    check(psr, 16'h0001, "CC unchanged without LD_CC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
