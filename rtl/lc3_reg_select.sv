// lc3_reg_select: DRMUX and SR1MUX, the two register-address multiplexers.
//
// DRMUX picks the destination register number: 00 = IR[11:9], 01 = 111 (R7),
// 10 = 110 (R6).  SR1MUX picks the first source register number: 00 = IR[11:9]
// (the source of a store), 01 = IR[8:6] (SR1 or BaseR), 10 = 110 (R6).  Both
// encodings are as drawn for the LC-3.  Select value 11 is unused; it is mapped to
// IR[11:9] here, a choice of this design.  Purely combinational.
module lc3_reg_select
  import lc3_pkg::*;
(
  input  word_t       ir,
  input  drmux_e      drmux,
  input  sr1mux_e     sr1mux,
  output logic [2:0]  dr,
  output logic [2:0]  sr1
);

  always_comb begin
    unique case (drmux)
      DRMUX_R7: dr = 3'b111;
      DRMUX_R6: dr = 3'b110;
      default:  dr = ir[11:9];
    endcase
    unique case (sr1mux)
      SR1MUX_IR8: sr1 = ir[8:6];
      SR1MUX_R6:  sr1 = 3'b110;
      default:    sr1 = ir[11:9];
    endcase
  end

endmodule
