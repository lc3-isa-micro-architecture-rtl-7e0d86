// tb_lc3_reg_file: self-checking test of the eight-entry register file.
// Random writes (with and without LD_REG) are mirrored in a reference array; both
// read ports are compared with it after every write, and reset must clear all eight.
module tb_lc3_reg_file;
  import lc3_pkg::*;
  logic clk = 0, rst, ld_reg;
  logic [2:0] dr, sr1, sr2;
  word_t din, sr1_out, sr2_out, regs_o [8];
  word_t model [8];
  int checks = 0, failures = 0;

  lc3_reg_file dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; ld_reg = 0; dr = 0; sr1 = 0; sr2 = 0; din = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 8; i++) begin
      model[i] = '0;
      check(regs_o[i], 16'h0, "reset value");
    end
    for (int t = 0; t < 1000; t++) begin
      ld_reg = ($urandom_range(0, 3) != 0);
      dr     = 3'($urandom);
      din    = 16'($urandom);
      @(posedge clk); #1;
      if (ld_reg) model[dr] = din;
      ld_reg = 0;
      sr1 = 3'($urandom);
      sr2 = 3'($urandom);
      #1;
      check(sr1_out, model[sr1], "sr1 read");
      check(sr2_out, model[sr2], "sr2 read");
    end
    for (int i = 0; i < 8; i++) check(regs_o[i], model[i], "register listing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
