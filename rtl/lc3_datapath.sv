// lc3_datapath: the LC-3 datapath around its shared bus.
//
// Holds the instruction register IR, the memory address register MAR and the memory
// data register MDR, and wires together the register file with its DRMUX/SR1MUX,
// the ALU with SR2MUX, the address unit (ADDR1MUX, ADDR2MUX, adder, MARMUX), the PC
// unit, the condition codes and the bus.  Every register loads on the rising clock
// edge when its LD_* bit in the control word is set, from the bus, except MDR: with
// MIO_EN set it loads the memory's read data, otherwise the bus.  All register
// transfers therefore take one clock: a value gated onto the bus in one state is in
// its destination register at the start of the next.
//
// The memory side (mar, mdr, mio_en, r_w, mem_dout) goes to the memory and is the
// point where a memory-I/O address decoder would attach.  psr shows the condition
// codes in PSR[2:0]; its other bits read zero, as privilege and priority are not
// modelled.  IR, MAR and MDR reset to zero, a choice of this design.
module lc3_datapath
  import lc3_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  word_t reset_pc,
  input  ctrl_t ctrl,
  // memory side
  input  word_t mem_dout,
  output word_t mar,
  output word_t mdr,
  // observation
  output word_t ir,
  output word_t pc,
  output word_t psr,
  output word_t bus,
  output word_t regs [8]
);

  logic [2:0] dr, sr1;
  logic [2:0] nzp;
  word_t      sr1_out, sr2_out, alu_out, addr_sum, marmux_out;

  lc3_reg_select u_sel (
    .ir, .drmux(ctrl.drmux), .sr1mux(ctrl.sr1mux), .dr, .sr1
  );

  lc3_reg_file #(.NREGS(8)) u_rf (
    .clk, .rst, .ld_reg(ctrl.ld_reg), .dr, .sr1, .sr2(ir[2:0]), .din(bus),
    .sr1_out, .sr2_out, .regs_o(regs)
  );

  lc3_alu u_alu (
    .sr1_out, .sr2_out, .ir, .aluk(ctrl.aluk), .alu_out
  );

  lc3_addr_unit u_addr (
    .ir, .pc, .sr1_out, .addr1mux(ctrl.addr1mux), .addr2mux(ctrl.addr2mux),
    .marmux(ctrl.marmux), .addr_sum, .marmux_out
  );

  lc3_pc_unit u_pc (
    .clk, .rst, .reset_pc, .ld_pc(ctrl.ld_pc), .pcmux(ctrl.pcmux), .bus, .addr_sum, .pc
  );

  lc3_cc_logic u_cc (
    .clk, .rst, .ld_cc(ctrl.ld_cc), .bus, .nzp
  );

  lc3_bus u_bus (
    .clk, .gate_pc(ctrl.gate_pc), .gate_marmux(ctrl.gate_marmux),
    .gate_alu(ctrl.gate_alu), .gate_mdr(ctrl.gate_mdr),
    .pc, .marmux_out, .alu_out, .mdr, .bus
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ir  <= '0;
      mar <= '0;
      mdr <= '0;
    end else begin
      if (ctrl.ld_ir)  ir  <= bus;
      if (ctrl.ld_mar) mar <= bus;
      if (ctrl.ld_mdr) mdr <= ctrl.mio_en ? mem_dout : bus;
    end
  end

  assign psr = {13'b0, nzp};

endmodule
