// tb_lc3_memory: checks the memory's harness load/peek ports, CPU reads and writes,
// and the ready signal: with LATENCY = 3, R must stay low for two cycles of MIO_EN
// and rise in the third, and a write must land only then.
module tb_lc3_memory;
  import lc3_pkg::*;
  localparam int unsigned LAT = 3;
  logic clk = 0, rst, mio_en, r_w, r, load_en;
  word_t addr, din, dout, load_addr, load_data, peek_addr, peek_data;
  word_t model [logic [15:0]];
  int checks = 0, failures = 0;

  lc3_memory #(.ADDR_W(16), .LATENCY(LAT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // One CPU access; returns the number of cycles until R.
  task automatic access(input logic wr, input word_t a, input word_t d, output int cycles);
    mio_en = 1; r_w = wr; addr = a; din = d;
    cycles = 0;
    forever begin
      #1;
      cycles++;
      if (r) break;
      if (wr) begin peek_addr = a; #1; check(peek_data === model[a], "no early write"); end
      @(posedge clk); #1;
    end
    @(posedge clk); #1;
    mio_en = 0;
  endtask

  initial begin
    int cyc;
    word_t a, d;
    rst = 1; mio_en = 0; r_w = 0; addr = 0; din = 0; load_en = 0; load_addr = 0; load_data = 0; peek_addr = 0;
    @(posedge clk); #1 rst = 0;
    // fill 200 random words through the load port
    for (int i = 0; i < 200; i++) begin
      a = 16'($urandom); d = 16'($urandom);
      load_en = 1; load_addr = a; load_data = d; model[a] = d;
      @(posedge clk); #1;
    end
    load_en = 0;
    foreach (model[k]) begin peek_addr = k; #1; check(peek_data === model[k], "peek after load"); end
    // CPU reads and writes
    for (int i = 0; i < 100; i++) begin
      if ($urandom_range(0, 1) == 1) begin
        a = 16'($urandom); d = 16'($urandom);
        if (!model.exists(a)) begin load_en = 1; load_addr = a; load_data = 0; model[a] = 0; @(posedge clk); #1 load_en = 0; end
        access(1'b1, a, d, cyc);
        model[a] = d;
        check(cyc == LAT, $sformatf("write took %0d cycles", cyc));
        peek_addr = a; #1; check(peek_data === d, "write landed");
      end else begin
        foreach (model[k]) begin a = k; if ($urandom_range(0, 7) == 0) break; end
        mio_en = 1; r_w = 0; addr = a;
        cyc = 0;
        forever begin #1; cyc++; if (r) break; @(posedge clk); #1; end
        check(dout === model[a], "read data");
        check(cyc == LAT, $sformatf("read took %0d cycles", cyc));
        @(posedge clk); #1 mio_en = 0;
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
