// lc3_pc_unit: the program counter with its PCMUX and incrementer.
//
// PCMUX chooses the next PC: 00 = PC + 1 (the fetch increment, state 18),
// 01 = the bus, 10 = the address adder.  Only 00 is used by the instructions this
// core executes; the other two inputs exist on the datapath and their encodings are
// this design's choice.  The PC loads on a rising edge with ld_pc.  Reset loads
// reset_pc, so a program can start anywhere in memory.
module lc3_pc_unit
  import lc3_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  word_t  reset_pc,
  input  logic   ld_pc,
  input  pcmux_e pcmux,
  input  word_t  bus,
  input  word_t  addr_sum,
  output word_t  pc
);

  word_t pc_next;

  always_comb begin
    unique case (pcmux)
      PCMUX_BUS:  pc_next = bus;
      PCMUX_ADDR: pc_next = addr_sum;
      default:    pc_next = pc + 16'd1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)        pc <= reset_pc;
    else if (ld_pc) pc <= pc_next;
  end

endmodule
