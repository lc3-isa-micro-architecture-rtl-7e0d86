// lc3_pkg: types and constants shared by the LC-3 datapath, control FSM and memory.
//
// The LC-3 is a 16-bit, word-addressed machine: a 16-bit address space of 16-bit
// words, 16-bit MAR and MDR, eight 16-bit general registers, and a 4-bit opcode in
// IR[15:12].  Its micro-architecture is a single shared bus driven through gates
// (GatePC, GateMDR, GateALU, GateMARMUX) and a control FSM whose states carry the
// traditional LC-3 state numbers (18/33/35 fetch, 32 decode, ...).
//
// The control word below holds every load enable, gate and mux select named on the
// datapath drawing.  Mux encodings follow the numbers printed on the drawing where
// there are any (ADDR2MUX 11/10/01/00, ADDR1MUX 1/0, MARMUX 0/1, SR2MUX 1/0, DRMUX,
// SR1MUX, PCMUX 00 = PC+1, ALUK 00 = ADD and 10 = NOT); the rest (PCMUX 01/10,
// ALUK 01 = AND and 11 = pass A) are this design's own choice, taken from the usual
// LC-3 assignment.
package lc3_pkg;

  localparam int unsigned WORD_W = 16;
  typedef logic [WORD_W-1:0] word_t;

  // Opcodes, IR[15:12].
  typedef enum logic [3:0] {
    OP_BR   = 4'b0000,
    OP_ADD  = 4'b0001,
    OP_LD   = 4'b0010,
    OP_ST   = 4'b0011,
    OP_JSR  = 4'b0100,
    OP_AND  = 4'b0101,
    OP_LDR  = 4'b0110,
    OP_STR  = 4'b0111,
    OP_RTI  = 4'b1000,
    OP_NOT  = 4'b1001,
    OP_LDI  = 4'b1010,
    OP_STI  = 4'b1011,
    OP_JMP  = 4'b1100,
    OP_RES  = 4'b1101,
    OP_LEA  = 4'b1110,
    OP_TRAP = 4'b1111
  } opcode_e;

  // Control FSM states, numbered as in the LC-3 state diagram.
  typedef enum logic [5:0] {
    S_ADD      = 6'd1,   // DR <- SR1 + SR2/imm5, set CC
    S_LD       = 6'd2,   // MAR <- PC + off9
    S_ST       = 6'd3,   // MAR <- PC + off9
    S_AND      = 6'd5,   // DR <- SR1 & SR2/imm5, set CC
    S_LDR      = 6'd6,   // MAR <- BaseR + off6
    S_STR      = 6'd7,   // MAR <- BaseR + off6
    S_NOT      = 6'd9,   // DR <- NOT(SR1), set CC
    S_LDI      = 6'd10,  // MAR <- PC + off9
    S_STI      = 6'd11,  // MAR <- PC + off9
    S_LEA      = 6'd14,  // DR <- PC + off9
    S_ST_WR    = 6'd16,  // M[MAR] <- MDR, wait for R
    S_FETCH1   = 6'd18,  // MAR <- PC, PC <- PC + 1
    S_ST_MDR   = 6'd23,  // MDR <- SR
    S_LDI_RD   = 6'd24,  // MDR <- M[MAR], wait for R
    S_LD_RD    = 6'd25,  // MDR <- M[MAR], wait for R
    S_LDI_MAR  = 6'd26,  // MAR <- MDR
    S_LD_WB    = 6'd27,  // DR <- MDR, set CC
    S_STI_RD   = 6'd29,  // MDR <- M[MAR], wait for R
    S_STI_MAR  = 6'd31,  // MAR <- MDR
    S_DECODE   = 6'd32,  // branch on IR[15:12]
    S_FETCH2   = 6'd33,  // MDR <- M[MAR], wait for R
    S_FETCH3   = 6'd35   // IR <- MDR
  } state_e;

  // Mux selects.
  typedef enum logic [1:0] {PCMUX_INC = 2'b00, PCMUX_BUS = 2'b01, PCMUX_ADDR = 2'b10} pcmux_e;
  typedef enum logic [1:0] {DRMUX_IR11 = 2'b00, DRMUX_R7 = 2'b01, DRMUX_R6 = 2'b10} drmux_e;
  typedef enum logic [1:0] {SR1MUX_IR11 = 2'b00, SR1MUX_IR8 = 2'b01, SR1MUX_R6 = 2'b10} sr1mux_e;
  typedef enum logic       {ADDR1_PC = 1'b0, ADDR1_SR1 = 1'b1} addr1mux_e;
  typedef enum logic [1:0] {ADDR2_ZERO = 2'b00, ADDR2_OFF6 = 2'b01,
                            ADDR2_OFF9 = 2'b10, ADDR2_OFF11 = 2'b11} addr2mux_e;
  typedef enum logic       {MARMUX_ZEXT = 1'b0, MARMUX_ADDR = 1'b1} marmux_e;
  typedef enum logic [1:0] {ALUK_ADD = 2'b00, ALUK_AND = 2'b01,
                            ALUK_NOT = 2'b10, ALUK_PASSA = 2'b11} aluk_e;

  // One control word per FSM state.  All-zero means "do nothing".
  typedef struct packed {
    logic      ld_mar;
    logic      ld_mdr;
    logic      ld_ir;
    logic      ld_reg;
    logic      ld_cc;
    logic      ld_pc;
    logic      gate_pc;
    logic      gate_mdr;
    logic      gate_alu;
    logic      gate_marmux;
    pcmux_e    pcmux;
    drmux_e    drmux;
    sr1mux_e   sr1mux;
    addr1mux_e addr1mux;
    addr2mux_e addr2mux;
    marmux_e   marmux;
    aluk_e     aluk;
    logic      mio_en;
    logic      r_w;      // 0 = read, 1 = write
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '0;

  function automatic word_t sext(input word_t v, input int unsigned bits);
    word_t r;
    for (int i = 0; i < WORD_W; i++) r[i] = (i < bits) ? v[i] : v[bits-1];
    return r;
  endfunction

endpackage
