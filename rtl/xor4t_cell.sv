// xor4t_cell: behavioural model of the 4-transistor XOR stage of the
// configurable ring oscillator. Not synthesizable logic: it stands for a
// transistor-level cell and is used only to simulate the rings.
//
// The cell is a CMOS inverter (M1/M2) whose supply rails are the control
// signals c and c_n, plus two pass transistors (M3/M4).
//   c=1, c_n=0 : M1/M2 form an inverter, M3/M4 are off  -> out = ~in
//   c=0, c_n=1 : M1/M2 are off, M3 or M4 passes in     -> out =  in
// Any other rail combination is not a legal control state; the model then
// keeps the last output (the output node floats). This hold is the model's
// own choice, and it is why lint tools report a latch on 'out'. The propagation delay differs between the two modes because
// different transistors conduct; both delays are parameters, in picoseconds.
//
// Ports: in, c, c_n (control rails), out. Timing: out follows after
// INV_DELAY or BUF_DELAY.
module xor4t_cell #(
  parameter realtime INV_DELAY = 23.7,   // ps, inverter mode
  parameter realtime BUF_DELAY = 43.0    // ps, pass-transistor (buffer) mode
) (
  input  logic in,
  input  logic c,
  input  logic c_n,
  output logic out
);
  timeunit 1ps; timeprecision 1fs;

  initial out = 1'b0;

  // Transport delay: every input change schedules the new output value
  // after the delay of the path that is conducting.
  always @(in, c, c_n) begin
    if (c && !c_n)      out <= #(INV_DELAY) ~in;
    else if (!c && c_n) out <= #(BUF_DELAY) in;
  end
endmodule
