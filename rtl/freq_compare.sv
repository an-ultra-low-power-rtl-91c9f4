// freq_compare: the '>' block of an RO pair. The response bit is 1 when the
// first ring's edge count is strictly larger than the second's, 0 otherwise
// (a tie gives 0, this design's choice). Purely combinational.
module freq_compare #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] count_a,
  input  logic [W-1:0] count_b,
  output logic         a_faster
);
  timeunit 1ps; timeprecision 1fs;

  assign a_faster = count_a > count_b;
endmodule
