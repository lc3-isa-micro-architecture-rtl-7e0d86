// tb_lc3_alu: checks SR2MUX and the four ALU operations on random operands and on
// the worked examples (NOT of 1100101011110000, R4 + (-2) through imm5).
module tb_lc3_alu;
  import lc3_pkg::*;
  word_t sr1_out, sr2_out, ir, alu_out, b, exp;
  aluk_e aluk;
  int checks = 0, failures = 0;

  lc3_alu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    #1;
    checks++;
    if (alu_out !== exp) begin
      failures++;
      $display("FAIL %s: a=%h b=%h ir=%h aluk=%0d got %h expected %h",
               what, sr1_out, sr2_out, ir, aluk, alu_out, exp);
    end
  endtask

  initial begin
    // NOT R3, R5 with R5 = 1100101011110000
    sr1_out = 16'b1100101011110000; sr2_out = 16'h1234; ir = 16'b1001_011_101_111111; aluk = ALUK_NOT;
    exp = 16'b0011010100001111; check("NOT example");
    // ADD R1, R4, #-2
    sr1_out = 16'd100; ir = 16'b0001_001_100_1_11110; aluk = ALUK_ADD;
    exp = 16'd98; check("ADD imm -2");
    for (int t = 0; t < 2000; t++) begin
      sr1_out = 16'($urandom);
      sr2_out = 16'($urandom);
      ir      = 16'($urandom);
      aluk    = aluk_e'(2'($urandom));
      // operand B worked out bit by bit
      if (ir[5]) b = {{11{ir[4]}}, ir[4:0]}; else b = sr2_out;
      case (aluk)
        ALUK_ADD: exp = 16'((32'(sr1_out) + 32'(b)) % 65536);
        ALUK_AND: exp = sr1_out & b;
        ALUK_NOT: exp = 16'hFFFF ^ sr1_out;
        default:  exp = sr1_out;
      endcase
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
