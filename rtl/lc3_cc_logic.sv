// lc3_cc_logic: the LOGIC block and the N, Z, P condition-code flip-flops.
//
// LOGIC classifies the 16-bit value on the bus as negative (bit 15 set), zero, or
// positive; on a rising edge with ld_cc exactly one of N, Z, P is set accordingly.
// Reset sets Z, this design's choice (the LC-3 always holds exactly one flag).
module lc3_cc_logic
  import lc3_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ld_cc,
  input  word_t      bus,
  output logic [2:0] nzp      // {N, Z, P}
);

  logic [2:0] nzp_next;

  always_comb begin
    if (bus[15])         nzp_next = 3'b100;
    else if (bus == '0)  nzp_next = 3'b010;
    else                 nzp_next = 3'b001;
  end

  always_ff @(posedge clk) begin
    if (rst)        nzp <= 3'b010;
    else if (ld_cc) nzp <= nzp_next;
  end

endmodule
