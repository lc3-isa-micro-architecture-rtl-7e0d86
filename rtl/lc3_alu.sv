// lc3_alu: SR2MUX and the ALU of the LC-3 operate instructions.
//
// The B operand is chosen by SR2MUX, which is steered directly by IR[5]: 0 selects
// the register file's SR2 output, 1 selects IR[4:0] sign-extended to 16 bits (imm5).
// The A operand is always SR1.  ALUK selects the operation: 00 = A + B,
// 10 = NOT A (both as in the LC-3 control lists), 01 = A AND B and 11 = pass A (the
// usual LC-3 assignment, used here for AND and for the store path MDR <- SR).
// Addition is 16-bit two's complement and wraps.  Purely combinational.
module lc3_alu
  import lc3_pkg::*;
(
  input  word_t  sr1_out,
  input  word_t  sr2_out,
  input  word_t  ir,
  input  aluk_e  aluk,
  output word_t  alu_out
);

  word_t b;

  always_comb begin
    b = ir[5] ? sext(ir, 5) : sr2_out;
    unique case (aluk)
      ALUK_ADD:   alu_out = sr1_out + b;
      ALUK_AND:   alu_out = sr1_out & b;
      ALUK_NOT:   alu_out = ~sr1_out;
      ALUK_PASSA: alu_out = sr1_out;
      default:    alu_out = sr1_out;
    endcase
  end

endmodule
