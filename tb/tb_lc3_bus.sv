// tb_lc3_bus: opens each of the four bus gates in turn (and none) and checks that
// the bus carries the gated source.
module tb_lc3_bus;
  import lc3_pkg::*;
  logic clk = 0, gate_pc, gate_marmux, gate_alu, gate_mdr;
  word_t pc, marmux_out, alu_out, mdr, bus, exp;
  int checks = 0, failures = 0;

  lc3_bus dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      pc = 16'($urandom); marmux_out = 16'($urandom); alu_out = 16'($urandom); mdr = 16'($urandom);
      {gate_pc, gate_marmux, gate_alu, gate_mdr} = 4'b0;
      case (t % 5)
        0: begin gate_pc = 1;     exp = pc;         end
        1: begin gate_marmux = 1; exp = marmux_out; end
        2: begin gate_alu = 1;    exp = alu_out;    end
        3: begin gate_mdr = 1;    exp = mdr;        end
        default: exp = 16'h0000;
      endcase
      @(negedge clk);
      checks++;
      if (bus !== exp) begin failures++; $display("FAIL case %0d: bus %h expected %h", t % 5, bus, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
