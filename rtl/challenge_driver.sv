// challenge_driver: the shared control-rail driver of the RO PUF.
//
// Every 4T stage needs both a control rail c and its complement c_n. One
// inverter per challenge bit produces the complements, and this single bank
// is shared by all rings of all PUF instances, so the rings themselves need
// no extra transistors. Purely combinational: c passes through unchanged and
// c_n is its bitwise inverse.
module challenge_driver #(
  parameter int unsigned N = 25
) (
  input  logic [N-1:0] chal,
  output logic [N-1:0] c,
  output logic [N-1:0] c_n
);
  timeunit 1ps; timeprecision 1fs;

  assign c   = chal;
  assign c_n = ~chal;
endmodule
