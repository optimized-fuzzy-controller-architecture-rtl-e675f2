// inference: compositional rule of inference for one output variable.
//
// An 8-bit counter scans the output universe e = 255, 254, ..., 0, one point
// per clock, and addresses the even and odd output MF memories (organised
// like the input ones, see mf_memory). The 2-bit MF code of each bank selects
// the truth value omega of that MF from the register block Reg' (ports
// rd_code_*/omega_*); a MIN circuit clips the membership value to omega, and
// a MAX circuit unites the even result, the odd result and CAS_in:
//     I'(e) = max( min(mu_even(e), omega_even), min(mu_odd(e), omega_odd), CAS_in )
// CAS_out carries I'(e) combinationally so that several controllers working
// in lock step can be chained into one output set; an unused CAS_in is 0.
// I'(e) is also registered into a stream for the defuzzifier, marked first
// at e = 255 and last at e = 0, and valid while `active` is high.
//
// Timing: the counter is reloaded to 255 at the end of each frame, so it
// reads 255 in the first cycle of every frame; the stream element of a
// cycle appears one clock later.
//
// Counter, MF RAMs, MIN, MAX and the cascade lines follow the original
// architecture; the downward scan, the combinational CAS_out and the stream
// register are choices made here.
module inference
  import fc_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           frame_last,   // last cycle of the frame
  input  logic           active,       // Reg' holds a real operation
  // output MF RAM load port
  input  logic           cfg_we,
  input  logic           cfg_odd,
  input  logic [RES-1:0] cfg_addr,
  input  mf_word_t       cfg_data,
  // register block Reg' access
  output mf_code_t       rd_code_even,
  output mf_code_t       rd_code_odd,
  input  mu_t            omega_even,
  input  mu_t            omega_odd,
  // cascade
  input  mu_t            cas_in,
  output mu_t            cas_out,
  // to the defuzzifier
  output fset_stream_t   fset
);

  logic [RES-1:0] addr;
  mf_word_t       even_q, odd_q;
  mu_t            lim_e, lim_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          addr <= '1;
    else if (frame_last) addr <= '1;
    else                 addr <= addr - 1'b1;
  end

  mf_memory u_mem (
    .clk    (clk),
    .we     (cfg_we),
    .wr_odd (cfg_odd),
    .waddr  (cfg_addr),
    .wdata  (cfg_data),
    .raddr  (addr),
    .even_q (even_q),
    .odd_q  (odd_q)
  );

  assign rd_code_even = even_q.code;
  assign rd_code_odd  = odd_q.code;

  always_comb begin
    lim_e   = (even_q.mu < omega_even) ? even_q.mu : omega_even;
    lim_o   = (odd_q.mu  < omega_odd)  ? odd_q.mu  : omega_odd;
    cas_out = (lim_e > lim_o) ? lim_e : lim_o;
    if (cas_in > cas_out) cas_out = cas_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fset <= '0;
    end else begin
      fset.valid <= active;
      fset.first <= (addr == '1);
      fset.last  <= (addr == '0);
      fset.data  <= cas_out;
    end
  end

endmodule
