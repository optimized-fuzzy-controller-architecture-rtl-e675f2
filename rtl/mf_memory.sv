// mf_memory: compressed membership-function storage of one variable.
//
// Instead of one RAM per membership function, the (up to) eight MFs of a
// variable share two RAMs: one holds all even-numbered MFs, the other all
// odd-numbered ones. This works as long as only neighbouring MFs overlap, so
// at any crisp value at most one even and one odd MF are non-zero. Each RAM
// word holds the 8-bit membership value and a 2-bit code naming which even
// (odd) MF that value belongs to; the full 3-bit MF number is the code with
// the bank's parity appended. Storage: 2 x 256 x (8 + 2) = 5120 bits.
//
// Interface: the crisp value is the read address; reads are combinational
// (like the asynchronous external RAMs of an FPGA board). Writes are
// synchronous through a single port that selects the bank with wr_odd.
// The memory is not reset; it must be loaded before use.
//
// The even/odd split and the 8 + 2 bit word follow the original architecture;
// the write port is a choice made here (the prototype used external SRAMs).
module mf_memory
  import fc_pkg::*;
(
  input  logic           clk,
  input  logic           we,
  input  logic           wr_odd,   // 0: even bank, 1: odd bank
  input  logic [RES-1:0] waddr,
  input  mf_word_t       wdata,
  input  logic [RES-1:0] raddr,    // crisp value
  output mf_word_t       even_q,
  output mf_word_t       odd_q
);

  mf_word_t even_mem [NPTS];
  mf_word_t odd_mem  [NPTS];

  always_ff @(posedge clk) begin
    if (we && !wr_odd) even_mem[waddr] <= wdata;
    if (we &&  wr_odd) odd_mem[waddr]  <= wdata;
  end

  assign even_q = even_mem[raddr];
  assign odd_q  = odd_mem[raddr];

endmodule
