// tb_lc3_cc_logic: checks that N, Z, P follow the sign of the bus value on LD_CC
// and hold otherwise.
module tb_lc3_cc_logic;
  import lc3_pkg::*;
  logic clk = 0, rst, ld_cc;
  word_t bus;
  logic [2:0] nzp, exp;
  int checks = 0, failures = 0;

  lc3_cc_logic dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ld_cc = 0; bus = 0;
    @(posedge clk); #1 rst = 0;
    exp = 3'b010;
    checks++; if (nzp !== exp) begin failures++; $display("FAIL reset %b", nzp); end
    for (int t = 0; t < 1000; t++) begin
      ld_cc = 1'($urandom);
      case ($urandom_range(0, 3))
        0: bus = 16'h0000;
        1: bus = 16'h8000 | 16'($urandom);
        2: bus = 16'h7FFF & 16'($urandom);
        default: bus = 16'($urandom);
      endcase
      if (ld_cc) begin
        if (int'(bus) >= 32768) exp = 3'b100;
        else if (int'(bus) == 0) exp = 3'b010;
        else exp = 3'b001;
      end
      @(posedge clk); #1;
      checks++;
      if (nzp !== exp) begin failures++; $display("FAIL bus=%h nzp=%b expected %b", bus, nzp, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
