// fc_pkg: types and constants shared by the fuzzy controller.
//
// The controller works with 8-bit crisp values and 8-bit membership values
// (255 stands for full membership 1.0). Every input and output variable has
// up to 8 membership functions (MFs), so an MF number is 3 bits. MFs are
// stored in two banks, even- and odd-numbered, each word carrying the
// membership value and the upper two bits of the MF number (the lowest bit
// is implied by the bank). The universe of each variable has 256 points and
// the rule base has 256 rules, so one pipeline step (a "frame") lasts 256
// main-clock cycles.
package fc_pkg;

  localparam int unsigned RES       = 8;          // bits per crisp / membership value
  localparam int unsigned NPTS      = 1 << RES;   // points of a universe of discourse
  localparam int unsigned NRULES    = 256;        // rules evaluated per frame, one per cycle
  localparam int unsigned MF_NUM_W  = 3;          // 8 MFs per variable
  localparam int unsigned MF_CODE_W = 2;          // MF number without its parity bit
  localparam int unsigned NMF       = 1 << MF_NUM_W;
  localparam int unsigned NMF_BANK  = NMF / 2;    // MFs per (even / odd) bank

  typedef logic [RES-1:0]       mu_t;       // membership value or crisp value
  typedef logic [MF_NUM_W-1:0]  mf_num_t;   // MF number 0..7
  typedef logic [MF_CODE_W-1:0] mf_code_t;  // MF number >> 1

  // One word of an even or odd membership-function RAM.
  typedef struct packed {
    mu_t      mu;    // membership value at this address
    mf_code_t code;  // which even (odd) MF the value belongs to
  } mf_word_t;

  // One element of the output fuzzy set I'(e), streamed from the inference
  // stage to the defuzzifier, e = 255 first down to e = 0 last.
  typedef struct packed {
    logic valid;
    logic first;
    logic last;
    mu_t  data;
  } fset_stream_t;

  // Which memory a configuration write goes to.
  typedef enum logic [1:0] {
    CFG_RULE   = 2'd0,  // rule base
    CFG_IN_MF  = 2'd1,  // membership functions of input variable cfg_var
    CFG_OUT_MF = 2'd2   // membership functions of output variable cfg_var
  } cfg_target_e;

endpackage
