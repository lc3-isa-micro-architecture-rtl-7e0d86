// lc3_memory: the LC-3 main memory, 2^16 words of 16 bits, word addressed.
//
// The CPU side follows the memory control bus of the LC-3: MIO_EN starts an access
// at address MAR, R_W selects read (0) or write (1), and the memory answers with the
// ready signal R.  The control FSM stays in its memory state while R = 0.  An
// access takes LATENCY cycles: R is low for the first LATENCY-1 cycles with MIO_EN
// held and high in the last, which is when a write is performed.  Read data is
// driven combinationally from the array at all times; MDR samples it while the FSM
// waits, so the value it holds after the R = 1 cycle is the word read.
//
// A second write port (load_*) and a read port (peek_*) let a test harness fill the
// memory and read it back without the CPU, the way a simulator's memory-initialise
// step does.  A load write takes priority over a CPU write to the same cycle.
// The ready/latency mechanism and the two harness ports are this design's own
// choices; the size and word width are the LC-3's.
module lc3_memory
  import lc3_pkg::*;
#(
  parameter int unsigned ADDR_W  = 16,
  parameter int unsigned LATENCY = 1
) (
  input  logic              clk,
  input  logic              rst,
  // CPU side
  input  logic              mio_en,
  input  logic              r_w,
  input  logic [ADDR_W-1:0] addr,
  input  word_t             din,
  output word_t             dout,
  output logic              r,
  // harness side
  input  logic              load_en,
  input  logic [ADDR_W-1:0] load_addr,
  input  word_t             load_data,
  input  logic [ADDR_W-1:0] peek_addr,
  output word_t             peek_data
);

  localparam int unsigned CNT_W = (LATENCY > 1) ? $clog2(LATENCY) : 1;

  word_t              mem [2**ADDR_W];
  logic [CNT_W-1:0]   wait_cnt;

  assign r = mio_en && (wait_cnt == CNT_W'(LATENCY - 1));

  always_ff @(posedge clk) begin
    if (rst || !mio_en || r) wait_cnt <= '0;
    else                     wait_cnt <= wait_cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (load_en)                 mem[load_addr] <= load_data;
    else if (mio_en && r_w && r) mem[addr]      <= din;
  end

  assign dout      = mem[addr];
  assign peek_data = mem[peek_addr];

endmodule
