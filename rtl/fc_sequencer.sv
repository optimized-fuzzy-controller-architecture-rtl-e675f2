// fc_sequencer: frame timing of the controller.
//
// The main clock (Phi, 5 MHz in the prototype) drives every pipeline stage.
// An 8-bit counter splits it into frames of 256 cycles: in each frame stage 1
// evaluates rules 0..255, one per cycle, and stage 2 scans the 256 points of
// the output universe. The counter is the rule address; frame_last marks the
// frame's last cycle, on whose closing edge inputs are sampled and results
// move one pipeline stage on. phi = Phi / 256 is the slow external clock, the
// counter's MSB (low in the first half of a frame, high in the second).
//
// The main clock, the 256-cycle rule pass and phi = Phi/256 follow the
// original architecture; deriving phi from the counter MSB is a choice made here.
module fc_sequencer
  import fc_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  output logic [$clog2(NRULES)-1:0] rule_addr,
  output logic                      frame_last,
  output logic                      phi
);

  logic [$clog2(NRULES)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign rule_addr  = cnt;
  assign frame_last = (cnt == '1);
  assign phi        = cnt[$clog2(NRULES)-1];

endmodule
