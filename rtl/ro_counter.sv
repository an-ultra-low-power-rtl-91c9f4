// ro_counter: counts rising edges of a ring-oscillator output.
//
// The counter is clocked by the ring itself and cleared asynchronously by
// 'clr' from the system clock domain. The measurement sequence guarantees
// that the ring is stopped whenever clr changes and whenever the count is
// read, so no synchronizer is needed. The counter saturates at all ones
// rather than wrapping, so an overlong window cannot reverse a comparison;
// saturation and the width are this design's choices.
module ro_counter #(
  parameter int unsigned W = 16
) (
  input  logic         ro_clk,
  input  logic         clr,
  output logic [W-1:0] count
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge ro_clk or posedge clr) begin
    if (clr)              count <= '0;
    else if (count != '1) count <= count + 1'b1;
  end
endmodule
