// ones_checker: decides whether an LFSR word may be applied as a challenge.
//
// A ring oscillates only with an odd number of inverting stages, so the
// candidate's ones are counted and checked:
//   mode_n = 0 : valid when the count is odd and between MIN_ONES and W
//                (any odd number of inverters, 3..25)
//   mode_n = 1 : valid when the count equals n_target (a user-chosen odd
//                number such as 15, 17, 19 or 21)
// Combinational: a W-input population count and two comparisons.
module ones_checker #(
  parameter int unsigned W        = 25,
  parameter int unsigned MIN_ONES = 3
) (
  input  logic [W-1:0]         cand,
  input  logic                 mode_n,
  input  logic [$clog2(W+1)-1:0] n_target,
  output logic [$clog2(W+1)-1:0] ones,
  output logic                 valid
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned CW = $clog2(W + 1);

  always_comb begin
    ones = '0;
    for (int i = 0; i < W; i++) ones = ones + CW'(cand[i]);
    if (mode_n) valid = (ones == n_target);
    else        valid = ones[0] && (ones >= CW'(MIN_ONES));
  end
endmodule
