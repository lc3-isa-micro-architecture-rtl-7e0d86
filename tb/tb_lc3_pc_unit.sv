// tb_lc3_pc_unit: checks PC reset, the PC+1 increment of state 18, loads from the
// bus and the address adder, and that the PC holds without LD_PC.
module tb_lc3_pc_unit;
  import lc3_pkg::*;
  logic clk = 0, rst, ld_pc;
  word_t reset_pc, bus, addr_sum, pc, exp;
  pcmux_e pcmux;
  int checks = 0, failures = 0;

  lc3_pc_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (pc !== exp) begin
      failures++; $display("FAIL %s: pc %h expected %h", what, pc, exp);
    end
  endtask

  initial begin
    rst = 1; reset_pc = 16'h3000; ld_pc = 0; pcmux = PCMUX_INC; bus = 0; addr_sum = 0;
    @(posedge clk); #1 rst = 0;
    exp = 16'h3000; check("reset");
    ld_pc = 1; @(posedge clk); #1; exp = 16'h3001; check("increment");
    reset_pc = 16'hFFFF; rst = 1; ld_pc = 0; @(posedge clk); #1 rst = 0;
    exp = 16'hFFFF; check("reset to xFFFF");
    ld_pc = 1; @(posedge clk); #1; exp = 16'h0000; check("increment wraps");
    for (int t = 0; t < 1000; t++) begin
      ld_pc = 1'($urandom); pcmux = pcmux_e'(2'($urandom_range(0, 2)));
      bus = 16'($urandom); addr_sum = 16'($urandom);
      if (ld_pc) exp = (pcmux == PCMUX_BUS) ? bus : (pcmux == PCMUX_ADDR) ? addr_sum : exp + 16'd1;
      @(posedge clk); #1;
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
