// lc3_bus: the LC-3's shared 16-bit bus.
//
// On the drawing four tri-state gates (GatePC, GateMARMUX, GateALU, GateMDR) drive
// one bus.  Here the tri-states are replaced by an AND-OR multiplexer: each source is
// masked by its gate and the results are ORed, which gives the same value whenever
// at most one gate is open.  With no gate open the bus reads zero (a choice of this
// design; a real tri-state bus would float).  An assertion checks that the control
// never opens two gates at once.  Purely combinational.
module lc3_bus
  import lc3_pkg::*;
(
  input  logic  clk,
  input  logic  gate_pc,
  input  logic  gate_marmux,
  input  logic  gate_alu,
  input  logic  gate_mdr,
  input  word_t pc,
  input  word_t marmux_out,
  input  word_t alu_out,
  input  word_t mdr,
  output word_t bus
);

  assign bus = ({WORD_W{gate_pc}}     & pc)
             | ({WORD_W{gate_marmux}} & marmux_out)
             | ({WORD_W{gate_alu}}    & alu_out)
             | ({WORD_W{gate_mdr}}    & mdr);

  // At most one driver on the bus at a time.
  a_one_driver: assert property (@(posedge clk)
    $onehot0({gate_pc, gate_marmux, gate_alu, gate_mdr}))
    else $error("lc3_bus: more than one gate drives the bus");

endmodule
