// tb_lc3_trace: a tick-by-tick trace of lc3_top at its default parameters.
//
// For every clock it prints the tick number, the FSM state, the control signals
// that are 1 and the mux selects that are not 0, in the form
//
//   ------( 3 )-----
//   -----((( 18 )))-----[ LD_MAR LD_PC GatePC ]-----[ ]-----
//
// and after every instruction a listing of PC, MAR, MDR, IR, PSR and R0..R7.  It
// runs LD R2, x0AF at x2019 (M[x20C9] = x0005), NOT R3, R2, LEA R5, #-3 and
// ADD R1, R2, #-2, and checks the state on every tick, the signal list of each
// state against its register-transfer description, and the registers at the end.
module tb_lc3_trace;
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
    repeat (2000) @(posedge clk);
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

  function automatic string signals(input ctrl_t c);
    string s = "";
    if (c.ld_mar)      s = {s, " LD_MAR"};
    if (c.ld_mdr)      s = {s, " LD_MDR"};
    if (c.ld_ir)       s = {s, " LD_IR"};
    if (c.ld_reg)      s = {s, " LD_REG"};
    if (c.ld_cc)       s = {s, " LD_CC"};
    if (c.ld_pc)       s = {s, " LD_PC"};
    if (c.gate_pc)     s = {s, " GatePC"};
    if (c.gate_mdr)    s = {s, " GateMDR"};
    if (c.gate_alu)    s = {s, " GateALU"};
    if (c.gate_marmux) s = {s, " GateMARMUX"};
    if (c.mio_en)      s = {s, " MIO_EN"};
    if (c.r_w)         s = {s, " R_W"};
    return s;
  endfunction

  function automatic string muxes(input ctrl_t c);
    string s = "";
    if (c.pcmux != 0)    s = {s, $sformatf(" PCMUX=%b", c.pcmux)};
    if (c.drmux != 0)    s = {s, $sformatf(" DRMUX=%b", c.drmux)};
    if (c.sr1mux != 0)   s = {s, $sformatf(" SR1MUX=%b", c.sr1mux)};
    if (c.addr1mux != 0) s = {s, $sformatf(" ADDR1MUX=%b", c.addr1mux)};
    if (c.addr2mux != 0) s = {s, $sformatf(" ADDR2MUX=%b", c.addr2mux)};
    if (c.marmux != 0)   s = {s, $sformatf(" MARMUX=%b", c.marmux)};
    if (c.aluk != 0)     s = {s, $sformatf(" ALUK=%b", c.aluk)};
    return s;
  endfunction

  // expected signal lists, written out from the register-transfer descriptions
  function automatic string expected(input int st);
    case (st)
      18: return " LD_MAR LD_PC GatePC";
      33: return " LD_MDR MIO_EN";
      35: return " LD_IR GateMDR";
      32: return "";
      2:  return " LD_MAR GateMARMUX";
      25: return " LD_MDR MIO_EN";
      27: return " LD_REG LD_CC GateMDR";
      9:  return " LD_REG LD_CC GateALU";
      14: return " LD_REG GateMARMUX";
      1:  return " LD_REG LD_CC GateALU";
      default: return "?";
    endcase
  endfunction

  initial begin
    int exp_states[$] = '{18, 33, 35, 32, 2, 25, 27,
                          18, 33, 35, 32, 9,
                          18, 33, 35, 32, 14,
                          18, 33, 35, 32, 1};
    int tick = 0;
    rst = 1; load_en = 0; load_addr = 0; load_data = 0; peek_addr = 0; reset_pc = 16'h2019;
    load(16'h2019, 16'b0010_010_010101111);    // LD  R2, x0AF
    load(16'h201A, 16'b1001_011_010_111111);   // NOT R3, R2
    load(16'h201B, 16'b1110_101_111111101);    // LEA R5, #-3
    load(16'h201C, 16'b0001_001_010_1_11110);  // ADD R1, R2, #-2
    load(16'h20C9, 16'h0005);
    @(posedge clk); #1 rst = 0;
    foreach (exp_states[k]) begin
      tick++;
      $display("------( %0d )-----", tick);
      $display("-----((( %0d )))-----[%s ]-----[%s ]-----", int'(state), signals(ctrl), muxes(ctrl));
      check(int'(state) == exp_states[k], $sformatf("tick %0d: state %0d expected %0d", tick, int'(state), exp_states[k]));
      check(signals(ctrl) == expected(int'(state)), $sformatf("state %0d signals [%s ]", int'(state), signals(ctrl)));
      @(posedge clk); #1;
      if (state == S_FETCH1) begin
        $display("PC=%h MAR=%h MDR=%h IR=%h PSR=%h", pc, mar, mdr, ir, psr);
        for (int r = 0; r < 8; r++) $display("  R%0d=%h", r, regs[r]);
      end
    end
    check(regs[2] == 16'h0005, "R2 = x0005");
    check(regs[3] == 16'hFFFA, "R3 = NOT x0005");
    check(regs[5] == 16'h2019, "R5 = x201C - 3");
    check(regs[1] == 16'h0003, "R1 = 5 - 2");
    check(psr == 16'h0001, "CC = P");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
