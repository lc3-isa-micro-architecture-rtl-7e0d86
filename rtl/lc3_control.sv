// lc3_control: the LC-3 control finite state machine.
//
// A Moore machine: each state issues one control word (ctrl_t) and the next state
// depends on the state, the opcode IR[15:12] and the memory ready signal R.  State
// numbers are the LC-3's.  The instruction cycle is
//
//   18  MAR <- PC, PC <- PC + 1            -> 33
//   33  MDR <- M[MAR]   (MIO_EN, R_W = 0)   R = 0: 33, R = 1: 35
//   35  IR  <- MDR                          -> 32
//   32  decode on IR[15:12]
//
// followed by the execute states of the opcode:
//
//   ADD  1  DR <- SR1 + SR2/imm5, CC        -> 18
//   AND  5  DR <- SR1 & SR2/imm5, CC        -> 18
//   NOT  9  DR <- NOT SR1, CC               -> 18
//   LEA 14  DR <- PC + off9 (CC unchanged)  -> 18
//   LD   2  MAR <- PC + off9                -> 25
//   LDR  6  MAR <- BaseR + off6             -> 25
//   LDI 10  MAR <- PC + off9                -> 24 (wait R) -> 26 MAR <- MDR -> 25
//       25  MDR <- M[MAR] (wait R)          -> 27 DR <- MDR, CC -> 18
//   ST   3  MAR <- PC + off9                -> 23
//   STR  7  MAR <- BaseR + off6             -> 23
//   STI 11  MAR <- PC + off9                -> 29 (wait R) -> 31 MAR <- MDR -> 23
//       23  MDR <- SR (ALU pass A)          -> 16 M[MAR] <- MDR (wait R) -> 18
//
// Fetch, decode, ADD, NOT, LEA and the three loads follow the LC-3 lecture material
// state by state.  AND and the three stores are named there but their states are
// not spelled out; they use the standard LC-3 states (5, 3, 7, 11, 23, 29, 31, 16).
// Branches, JMP, JSR, TRAP and RTI are not part of this core: their opcodes (and
// the reserved one) return from decode straight to fetch, executing as no-ops.  The
// interrupt test in state 18 is not implemented.  Reset enters state 18.
module lc3_control
  import lc3_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  word_t  ir,
  input  logic   r,
  output state_e state,
  output ctrl_t  ctrl
);

  state_e  next;
  opcode_e opcode;

  assign opcode = opcode_e'(ir[15:12]);

  always_ff @(posedge clk) begin
    if (rst) state <= S_FETCH1;
    else     state <= next;
  end

  always_comb begin
    next = S_FETCH1;
    unique case (state)
      S_FETCH1:  next = S_FETCH2;
      S_FETCH2:  next = r ? S_FETCH3 : S_FETCH2;
      S_FETCH3:  next = S_DECODE;
      S_DECODE: begin
        unique case (opcode)
          OP_ADD:  next = S_ADD;
          OP_AND:  next = S_AND;
          OP_NOT:  next = S_NOT;
          OP_LEA:  next = S_LEA;
          OP_LD:   next = S_LD;
          OP_LDR:  next = S_LDR;
          OP_LDI:  next = S_LDI;
          OP_ST:   next = S_ST;
          OP_STR:  next = S_STR;
          OP_STI:  next = S_STI;
          default: next = S_FETCH1;
        endcase
      end
      S_LD, S_LDR: next = S_LD_RD;
      S_LDI:       next = S_LDI_RD;
      S_LDI_RD:    next = r ? S_LDI_MAR : S_LDI_RD;
      S_LDI_MAR:   next = S_LD_RD;
      S_LD_RD:     next = r ? S_LD_WB : S_LD_RD;
      S_ST, S_STR: next = S_ST_MDR;
      S_STI:       next = S_STI_RD;
      S_STI_RD:    next = r ? S_STI_MAR : S_STI_RD;
      S_STI_MAR:   next = S_ST_MDR;
      S_ST_MDR:    next = S_ST_WR;
      S_ST_WR:     next = r ? S_FETCH1 : S_ST_WR;
      default:     next = S_FETCH1;   // S_ADD, S_AND, S_NOT, S_LEA, S_LD_WB
    endcase
  end

  always_comb begin
    ctrl = CTRL_IDLE;
    unique case (state)
      S_FETCH1: begin
        ctrl.gate_pc = 1'b1; ctrl.ld_mar = 1'b1;
        ctrl.pcmux   = PCMUX_INC; ctrl.ld_pc = 1'b1;
      end
      S_FETCH2, S_LD_RD, S_LDI_RD, S_STI_RD: begin
        ctrl.mio_en = 1'b1; ctrl.r_w = 1'b0; ctrl.ld_mdr = 1'b1;
      end
      S_FETCH3: begin
        ctrl.gate_mdr = 1'b1; ctrl.ld_ir = 1'b1;
      end
      S_ADD, S_AND, S_NOT: begin
        ctrl.sr1mux   = SR1MUX_IR8;
        ctrl.drmux    = DRMUX_IR11;
        ctrl.aluk     = (state == S_ADD) ? ALUK_ADD : (state == S_AND) ? ALUK_AND : ALUK_NOT;
        ctrl.gate_alu = 1'b1; ctrl.ld_reg = 1'b1; ctrl.ld_cc = 1'b1;
      end
      S_LEA: begin
        ctrl.addr1mux = ADDR1_PC; ctrl.addr2mux = ADDR2_OFF9; ctrl.marmux = MARMUX_ADDR;
        ctrl.gate_marmux = 1'b1; ctrl.drmux = DRMUX_IR11; ctrl.ld_reg = 1'b1;
      end
      S_LD, S_LDI, S_ST, S_STI: begin
        ctrl.addr1mux = ADDR1_PC; ctrl.addr2mux = ADDR2_OFF9; ctrl.marmux = MARMUX_ADDR;
        ctrl.gate_marmux = 1'b1; ctrl.ld_mar = 1'b1;
      end
      S_LDR, S_STR: begin
        ctrl.sr1mux = SR1MUX_IR8;
        ctrl.addr1mux = ADDR1_SR1; ctrl.addr2mux = ADDR2_OFF6; ctrl.marmux = MARMUX_ADDR;
        ctrl.gate_marmux = 1'b1; ctrl.ld_mar = 1'b1;
      end
      S_LDI_MAR, S_STI_MAR: begin
        ctrl.gate_mdr = 1'b1; ctrl.ld_mar = 1'b1;
      end
      S_LD_WB: begin
        ctrl.gate_mdr = 1'b1; ctrl.drmux = DRMUX_IR11; ctrl.ld_reg = 1'b1; ctrl.ld_cc = 1'b1;
      end
      S_ST_MDR: begin
        ctrl.sr1mux = SR1MUX_IR11; ctrl.aluk = ALUK_PASSA; ctrl.gate_alu = 1'b1;
        ctrl.ld_mdr = 1'b1;
      end
      S_ST_WR: begin
        ctrl.mio_en = 1'b1; ctrl.r_w = 1'b1;
      end
      default: ctrl = CTRL_IDLE;        // S_DECODE
    endcase
  end

endmodule
