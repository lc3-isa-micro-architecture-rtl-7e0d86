// tb_lc3_reg_select: exhaustive test of DRMUX and SR1MUX over all IR register
// fields and all defined select values, against the encodings drawn for the LC-3.
module tb_lc3_reg_select;
  import lc3_pkg::*;
  word_t ir;
  drmux_e drmux;
  sr1mux_e sr1mux;
  logic [2:0] dr, sr1, exp_dr, exp_sr1;
  int checks = 0, failures = 0;

  lc3_reg_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 64; f++) begin
      for (int s = 0; s < 3; s++) begin
        ir = 16'($urandom);
        ir[11:9] = 3'(f >> 3);
        ir[8:6]  = 3'(f);
        drmux  = drmux_e'(2'(s));
        sr1mux = sr1mux_e'(2'(s));
        #1;
        exp_dr  = (s == 0) ? 3'(f >> 3) : (s == 1) ? 3'd7 : 3'd6;
        exp_sr1 = (s == 0) ? 3'(f >> 3) : (s == 1) ? 3'(f) : 3'd6;
        checks += 2;
        if (dr !== exp_dr)   begin failures++; $display("FAIL dr sel=%0d ir=%h got %0d", s, ir, dr); end
        if (sr1 !== exp_sr1) begin failures++; $display("FAIL sr1 sel=%0d ir=%h got %0d", s, ir, sr1); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
