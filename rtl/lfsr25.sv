// lfsr25: the challenge counter, a Fibonacci LFSR with serial seed load.
//
// Register bits q[0]..q[W-1] form a shift chain (q[0] is the first flip-flop).
// On each enabled clock the chain shifts by one: q[i] <= q[i-1], and q[0]
// receives either the serial 'seed' bit (load=1) or the feedback
// q[TAP] ^ q[W-1] (load=0). A W-bit seed is therefore shifted in over W
// loading clocks, first bit ending up in q[W-1]. The structure (input mux
// between seed and feedback, XOR of stage 2 and the last stage) follows the
// published circuit; with W=25, TAP=2 the feedback polynomial is primitive,
// so every non-zero state recurs only after 2^25-1 steps.
// 'step' is a clock enable: the published circuit gates the clock with the
// same condition, this design uses an enable instead.
module lfsr25 #(
  parameter int unsigned W   = 25,
  parameter int unsigned TAP = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic         load,
  input  logic         seed,
  output logic [W-1:0] q
);
  timeunit 1ps; timeprecision 1fs;

  logic fb;
  assign fb = load ? seed : (q[TAP] ^ q[W-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            q <= W'(1);
    else if (step || load) q <= {q[W-2:0], fb};
  end
endmodule
