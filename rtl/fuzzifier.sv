// fuzzifier: truth value of one subpremise ("input i is MF m").
//
// The input's crisp value addresses the even and odd membership-function
// RAMs (mf_memory). Each returns a membership value and a 2-bit code; the
// code shifted left with a 0 (even bank) or a 1 (odd bank) appended is the
// full MF number of that value. Two comparators check these numbers against
// the MF number the current rule asks for, and a multiplexer passes the
// matching membership value, or zero if neither bank holds that MF at this
// input value:
//     X (even match)  Y (odd match)   alpha
//         0               0           0
//         1               0           even value
//         0               1           odd value
// X and Y can never both be 1 because the two numbers differ in parity.
//
// Timing: alpha is combinational from x and mf_sel. In the controller x is
// held for a whole frame while mf_sel changes every cycle with the rule.
//
// Comparators, parity shift and the selection table follow the original
// architecture; only the combinational timing is a choice made here.
module fuzzifier
  import fc_pkg::*;
(
  input  logic           clk,
  // membership-function RAM load port
  input  logic           cfg_we,
  input  logic           cfg_odd,
  input  logic [RES-1:0] cfg_addr,
  input  mf_word_t       cfg_data,
  // evaluation
  input  mu_t            x,        // crisp input value
  input  mf_num_t        mf_sel,   // MF named by the rule's subpremise
  output mu_t            alpha     // truth value of the subpremise
);

  mf_word_t even_q, odd_q;
  mf_num_t  even_num, odd_num;
  logic     sel_x, sel_y;

  mf_memory u_mem (
    .clk    (clk),
    .we     (cfg_we),
    .wr_odd (cfg_odd),
    .waddr  (cfg_addr),
    .wdata  (cfg_data),
    .raddr  (x),
    .even_q (even_q),
    .odd_q  (odd_q)
  );

  assign even_num = {even_q.code, 1'b0};
  assign odd_num  = {odd_q.code,  1'b1};
  assign sel_x    = (even_num == mf_sel);
  assign sel_y    = (odd_num  == mf_sel);

  always_comb begin
    unique case ({sel_x, sel_y})
      2'b10:   alpha = even_q.mu;
      2'b01:   alpha = odd_q.mu;
      default: alpha = '0;
    endcase
  end

endmodule
