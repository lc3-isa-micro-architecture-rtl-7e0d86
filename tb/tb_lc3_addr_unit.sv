// tb_lc3_addr_unit: checks the address adder, both address muxes and MARMUX on the
// worked examples (LD at x2019, LDI at x4A1C, LDR with BaseR = x0005, LEA at x0200)
// and on random operands.
module tb_lc3_addr_unit;
  import lc3_pkg::*;
  word_t ir, pc, sr1_out, addr_sum, marmux_out, exp_sum, exp_mm;
  addr1mux_e addr1mux;
  addr2mux_e addr2mux;
  marmux_e marmux;
  int checks = 0, failures = 0;

  lc3_addr_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    #1;
    checks += 2;
    if (addr_sum !== exp_sum) begin
      failures++; $display("FAIL %s: sum %h expected %h", what, addr_sum, exp_sum);
    end
    if (marmux_out !== exp_mm) begin
      failures++; $display("FAIL %s: marmux %h expected %h", what, marmux_out, exp_mm);
    end
  endtask

  function automatic word_t ext(input word_t v, input int n);
    // sign extension written as arithmetic: value of the n-bit field minus 2^n if negative
    int x = int'(v) % (1 << n);
    if (x >= (1 << (n - 1))) x -= (1 << n);
    return word_t'(x);
  endfunction

  initial begin
    sr1_out = 16'h0005; marmux = MARMUX_ADDR;
    // LD R2, x0AF with PC = x201A -> x20C9
    ir = 16'b0010_010_010101111; pc = 16'h201A; addr1mux = ADDR1_PC; addr2mux = ADDR2_OFF9;
    exp_sum = 16'h20C9; exp_mm = 16'h20C9; check("LD example");
    // LDI R3, x1CC with PC = x4A1D -> x49E9
    ir = 16'b1010_011_111001100; pc = 16'h4A1D;
    exp_sum = 16'h49E9; exp_mm = 16'h49E9; check("LDI example");
    // LDR R1, R2, x0D with R2 = x0005 -> x0012
    ir = 16'b0110_001_010_001101; addr1mux = ADDR1_SR1; addr2mux = ADDR2_OFF6;
    exp_sum = 16'h0012; exp_mm = 16'h0012; check("LDR example");
    // LEA R5, x1FD with PC = x0201 -> x01FE
    ir = 16'b1110_101_111111101; pc = 16'h0201; addr1mux = ADDR1_PC; addr2mux = ADDR2_OFF9;
    exp_sum = 16'h01FE; exp_mm = 16'h01FE; check("LEA example");
    for (int t = 0; t < 2000; t++) begin
      ir = 16'($urandom); pc = 16'($urandom); sr1_out = 16'($urandom);
      addr1mux = addr1mux_e'(1'($urandom));
      addr2mux = addr2mux_e'(2'($urandom));
      marmux   = marmux_e'(1'($urandom));
      exp_sum = (addr1mux == ADDR1_SR1) ? sr1_out : pc;
      case (addr2mux)
        ADDR2_OFF6:  exp_sum += ext(ir, 6);
        ADDR2_OFF9:  exp_sum += ext(ir, 9);
        ADDR2_OFF11: exp_sum += ext(ir, 11);
        default: ;
      endcase
      exp_mm = (marmux == MARMUX_ADDR) ? exp_sum : word_t'(int'(ir) % 256);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
