// lc3_addr_unit: effective-address generation of the LC-3.
//
// The address adder sums an ADDR1MUX base and an ADDR2MUX offset.  ADDR1MUX:
// 0 = PC, 1 = SR1 (BaseR).  ADDR2MUX: 00 = zero, 01 = SEXT(IR[5:0]) (offset6),
// 10 = SEXT(IR[8:0]) (PCoffset9), 11 = SEXT(IR[10:0]) (PCoffset11).  MARMUX then
// chooses between ZEXT(IR[7:0]) (0) and the adder output (1); that value is what
// GateMARMUX puts on the bus.  The adder output also goes to PCMUX.  The mux
// numbering is the one drawn on the LC-3 datapath.  Purely combinational.
module lc3_addr_unit
  import lc3_pkg::*;
(
  input  word_t      ir,
  input  word_t      pc,
  input  word_t      sr1_out,
  input  addr1mux_e  addr1mux,
  input  addr2mux_e  addr2mux,
  input  marmux_e    marmux,
  output word_t      addr_sum,
  output word_t      marmux_out
);

  word_t base, offset;

  always_comb begin
    base = (addr1mux == ADDR1_SR1) ? sr1_out : pc;
    unique case (addr2mux)
      ADDR2_OFF6:  offset = sext(ir, 6);
      ADDR2_OFF9:  offset = sext(ir, 9);
      ADDR2_OFF11: offset = sext(ir, 11);
      default:     offset = '0;
    endcase
    addr_sum   = base + offset;
    marmux_out = (marmux == MARMUX_ADDR) ? addr_sum : {8'h00, ir[7:0]};
  end

endmodule
