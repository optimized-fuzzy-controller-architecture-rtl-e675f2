// activated_rule_reg: register block for activated rules (stage 1 -> 2).
//
// For one output variable this block collects, over the 256 rules of a
// frame, the largest rule truth value omega that names each output MF as
// its conclusion (the MAX of the MIN-MAX method). It is organised like the
// MF memories, in an even and an odd bank of four registers each:
//   * the LSB of the rule's conclusion MF number steers omega to the even or
//     the odd MAX circuit (demultiplexer);
//   * the upper two bits select, through a multiplexer, the stored value
//     omega_pre of that MF, and the register is overwritten only when
//     omega > omega_pre;
//   * when the last rule of the frame is processed (transfer = 1) the bank
//     values, including that last rule's update, move into the second
//     register block Reg0'..Reg7' and the first block starts again from 0.
// The second block is read by the inference stage through one multiplexer
// per bank, addressed by the 2-bit MF codes read from the output MF memory.
//
// Timing: one rule per clock while valid is high; Reg' changes only on the
// clock edge where transfer is high, and is read combinationally.
//
// Banks, MAX-on-greater update and the transfer to Reg' follow the original
// architecture; clearing Reg on the transfer edge and folding the last rule
// straight into Reg' are choices made here.
module activated_rule_reg
  import fc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     valid,         // a rule of a real operation is presented
  input  mu_t      omega,         // its truth value
  input  mf_num_t  mf_num,        // its conclusion MF for this output
  input  logic     transfer,      // this is the last rule of the frame
  input  mf_code_t rd_code_even,  // read select for Reg0', Reg2', Reg4', Reg6'
  input  mf_code_t rd_code_odd,   // read select for Reg1', Reg3', Reg5', Reg7'
  output mu_t      omega_even,
  output mu_t      omega_odd
);

  mu_t reg_e  [NMF_BANK];   // Reg0, Reg2, Reg4, Reg6
  mu_t reg_o  [NMF_BANK];   // Reg1, Reg3, Reg5, Reg7
  mu_t regp_e [NMF_BANK];   // Reg0', Reg2', ...
  mu_t regp_o [NMF_BANK];   // Reg1', Reg3', ...
  mu_t nxt_e  [NMF_BANK];
  mu_t nxt_o  [NMF_BANK];

  mf_code_t slot;
  mu_t      pre_e, pre_o;
  logic     upd_e, upd_o;

  assign slot  = mf_num[MF_NUM_W-1:1];
  assign pre_e = reg_e[slot];
  assign pre_o = reg_o[slot];
  assign upd_e = valid && !mf_num[0] && (omega > pre_e);
  assign upd_o = valid &&  mf_num[0] && (omega > pre_o);

  always_comb begin
    nxt_e = reg_e;
    nxt_o = reg_o;
    if (upd_e) nxt_e[slot] = omega;
    if (upd_o) nxt_o[slot] = omega;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_e  <= '{default: '0};
      reg_o  <= '{default: '0};
      regp_e <= '{default: '0};
      regp_o <= '{default: '0};
    end else if (transfer) begin
      regp_e <= nxt_e;
      regp_o <= nxt_o;
      reg_e  <= '{default: '0};
      reg_o  <= '{default: '0};
    end else begin
      reg_e  <= nxt_e;
      reg_o  <= nxt_o;
    end
  end

  assign omega_even = regp_e[rd_code_even];
  assign omega_odd  = regp_o[rd_code_odd];

endmodule
