// lc3_reg_file: the LC-3 general register file, R0..R7.
//
// Eight 16-bit registers with two combinational read ports (SR1, SR2) and one
// synchronous write port (DR).  On a rising clock edge with ld_reg high the value on
// din (the shared bus) is written into register dr.  The register count and width
// are the LC-3's; the synchronous reset to zero is this design's own choice so that
// simulation starts from known contents.  regs_o exposes all eight registers for
// observation, the way a register listing shows them after each step.
module lc3_reg_file
  import lc3_pkg::*;
#(
  parameter int unsigned NREGS = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     ld_reg,
  input  logic [$clog2(NREGS)-1:0] dr,
  input  logic [$clog2(NREGS)-1:0] sr1,
  input  logic [$clog2(NREGS)-1:0] sr2,
  input  word_t                    din,
  output word_t                    sr1_out,
  output word_t                    sr2_out,
  output word_t                    regs_o [NREGS]
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (ld_reg) begin
      regs[dr] <= din;
    end
  end

  assign sr1_out = regs[sr1];
  assign sr2_out = regs[sr2];
  assign regs_o  = regs;

endmodule
