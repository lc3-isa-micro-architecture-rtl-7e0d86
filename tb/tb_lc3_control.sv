// tb_lc3_control: runs the control FSM through one instruction of every opcode with
// a memory that answers R = 1 only on the third cycle of each access.  The visited
// state sequence (wait cycles folded) is compared with the LC-3 state diagram, the
// number of wait cycles with the memory latency, and key control-word bits of each
// state with the register-transfer lists (e.g. state 18: GatePC, LD_MAR, LD_PC,
// PCMUX = 00; state 9: ALUK = 10; state 33: MIO_EN, R_W = 0).
module tb_lc3_control;
  import lc3_pkg::*;
  localparam int LAT = 3;
  logic clk = 0, rst, r;
  word_t ir;
  state_e state;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  int wait_cnt;

  lc3_control dut (.*);
  always #5 clk = ~clk;

  // memory ready model
  always_ff @(posedge clk) begin
    if (rst || !ctrl.mio_en || r) wait_cnt <= 0;
    else                          wait_cnt <= wait_cnt + 1;
  end
  assign r = ctrl.mio_en && (wait_cnt == LAT - 1);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // per-state control word rules from the register-transfer lists
  task automatic check_ctrl();
    string s = $sformatf("state %0d", int'(state));
    check($onehot0({ctrl.gate_pc, ctrl.gate_mdr, ctrl.gate_alu, ctrl.gate_marmux}), {s, " one gate"});
    case (state)
      S_FETCH1: check(ctrl.gate_pc && ctrl.ld_mar && ctrl.ld_pc && ctrl.pcmux == PCMUX_INC && !ctrl.mio_en, {s, " fetch1"});
      S_FETCH2: check(ctrl.mio_en && !ctrl.r_w && ctrl.ld_mdr && !ctrl.ld_mar, {s, " fetch2"});
      S_FETCH3: check(ctrl.gate_mdr && ctrl.ld_ir && !ctrl.ld_reg, {s, " fetch3"});
      S_NOT:    check(ctrl.gate_alu && ctrl.ld_reg && ctrl.ld_cc && ctrl.aluk == ALUK_NOT
                      && ctrl.drmux == DRMUX_IR11 && ctrl.sr1mux == SR1MUX_IR8, {s, " NOT"});
      S_ADD:    check(ctrl.gate_alu && ctrl.ld_reg && ctrl.ld_cc && ctrl.aluk == ALUK_ADD, {s, " ADD"});
      S_AND:    check(ctrl.gate_alu && ctrl.ld_reg && ctrl.ld_cc && ctrl.aluk == ALUK_AND, {s, " AND"});
      S_LD, S_LDI, S_ST, S_STI:
                check(ctrl.gate_marmux && ctrl.ld_mar && ctrl.addr1mux == ADDR1_PC
                      && ctrl.addr2mux == ADDR2_OFF9 && ctrl.marmux == MARMUX_ADDR, {s, " PC+off9"});
      S_LDR, S_STR:
                check(ctrl.gate_marmux && ctrl.ld_mar && ctrl.addr1mux == ADDR1_SR1
                      && ctrl.sr1mux == SR1MUX_IR8 && ctrl.addr2mux == ADDR2_OFF6, {s, " BaseR+off6"});
      S_LEA:    check(ctrl.gate_marmux && ctrl.ld_reg && !ctrl.ld_cc && !ctrl.ld_mar
                      && ctrl.addr2mux == ADDR2_OFF9, {s, " LEA"});
      S_LD_RD, S_LDI_RD, S_STI_RD:
                check(ctrl.mio_en && !ctrl.r_w && ctrl.ld_mdr, {s, " read"});
      S_LDI_MAR, S_STI_MAR: check(ctrl.gate_mdr && ctrl.ld_mar, {s, " MAR<-MDR"});
      S_LD_WB:  check(ctrl.gate_mdr && ctrl.ld_reg && ctrl.ld_cc && ctrl.drmux == DRMUX_IR11, {s, " DR<-MDR"});
      S_ST_MDR: check(ctrl.gate_alu && ctrl.ld_mdr && !ctrl.mio_en && ctrl.aluk == ALUK_PASSA
                      && ctrl.sr1mux == SR1MUX_IR11, {s, " MDR<-SR"});
      S_ST_WR:  check(ctrl.mio_en && ctrl.r_w && !ctrl.ld_mdr, {s, " write"});
      S_DECODE: check(ctrl == CTRL_IDLE, {s, " decode idle"});
      default:  check(1'b0, {s, " unexpected state"});
    endcase
  endtask

  task automatic run(input opcode_e op, input int exp_seq[$]);
    int seq[$];
    int waits = 0, mem_states = 0;
    ir = {op, 12'($urandom)};
    rst = 1; @(posedge clk); #1 rst = 0;
    // from fetch through to the next fetch
    do begin
      check_ctrl();
      if (seq.size() == 0 || seq[$] != int'(state)) begin
        seq.push_back(int'(state));
        if (ctrl.mio_en) mem_states++;
      end else waits++;
      @(posedge clk); #1;
    end while (!(state == S_FETCH1) && seq.size() < 20);
    seq.push_back(int'(state));
    check(seq == exp_seq, $sformatf("%s sequence %p expected %p", op.name(), seq, exp_seq));
    check(waits == mem_states * (LAT - 1), $sformatf("%s waits %0d for %0d accesses", op.name(), waits, mem_states));
  endtask

  initial begin
    rst = 1; ir = 0;
    run(OP_NOT, '{18, 33, 35, 32, 9, 18});
    run(OP_ADD, '{18, 33, 35, 32, 1, 18});
    run(OP_AND, '{18, 33, 35, 32, 5, 18});
    run(OP_LEA, '{18, 33, 35, 32, 14, 18});
    run(OP_LD,  '{18, 33, 35, 32, 2, 25, 27, 18});
    run(OP_LDR, '{18, 33, 35, 32, 6, 25, 27, 18});
    run(OP_LDI, '{18, 33, 35, 32, 10, 24, 26, 25, 27, 18});
    run(OP_ST,  '{18, 33, 35, 32, 3, 23, 16, 18});
    run(OP_STR, '{18, 33, 35, 32, 7, 23, 16, 18});
    run(OP_STI, '{18, 33, 35, 32, 11, 29, 31, 23, 16, 18});
    run(OP_BR,  '{18, 33, 35, 32, 18});
    run(OP_TRAP, '{18, 33, 35, 32, 18});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
