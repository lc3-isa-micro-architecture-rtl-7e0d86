// lc3_top: an LC-3 processor with its memory.
//
// The control FSM (lc3_control) drives the datapath (lc3_datapath) one control word
// per clock; the datapath's MAR, MDR, MIO_EN and R_W reach the 2^16 x 16 memory
// (lc3_memory), whose ready signal R returns to the FSM.  After reset the PC holds
// reset_pc and the FSM starts fetching there.
//
// Harness ports: while rst is high a test loads a program with load_en/load_addr/
// load_data; peek_addr/peek_data read memory back at any time.  The outputs state,
// pc, ir, mar, mdr, psr, regs and the datapath bus expose the machine state after every clock, and
// mio_en/r_w/bus_addr/bus_wdata show the memory control bus, which is where
// memory-mapped input and output devices would be decoded.
//
// MEM_LATENCY is the number of cycles a memory access takes (R stays low for
// MEM_LATENCY-1 of them); 1 is this design's default.
module lc3_top
  import lc3_pkg::*;
#(
  parameter int unsigned MEM_LATENCY = 1
) (
  input  logic   clk,
  input  logic   rst,
  input  word_t  reset_pc,
  input  logic   load_en,
  input  word_t  load_addr,
  input  word_t  load_data,
  input  word_t  peek_addr,
  output word_t  peek_data,
  output state_e state,
  output ctrl_t  ctrl,
  output word_t  pc,
  output word_t  ir,
  output word_t  mar,
  output word_t  mdr,
  output word_t  psr,
  output word_t  regs [8],
  output logic   mio_en,
  output logic   r_w,
  output logic   mem_r,
  output word_t  bus_addr,
  output word_t  bus_wdata,
  output word_t  bus
);

  word_t mem_dout;

  lc3_control u_ctrl (
    .clk, .rst, .ir, .r(mem_r), .state, .ctrl
  );

  lc3_datapath u_dp (
    .clk, .rst, .reset_pc, .ctrl, .mem_dout, .mar, .mdr, .ir, .pc, .psr, .bus, .regs
  );

  lc3_memory #(.ADDR_W(16), .LATENCY(MEM_LATENCY)) u_mem (
    .clk, .rst, .mio_en(ctrl.mio_en), .r_w(ctrl.r_w), .addr(mar), .din(mdr),
    .dout(mem_dout), .r(mem_r), .load_en, .load_addr, .load_data, .peek_addr, .peek_data
  );

  assign mio_en    = ctrl.mio_en;
  assign r_w       = ctrl.r_w;
  assign bus_addr  = mar;
  assign bus_wdata = mdr;

endmodule
