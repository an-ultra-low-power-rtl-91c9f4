// tb_xor4t_cell: checks the 4T stage model. For each control state the
// output is sampled just before and just after the expected delay, so both
// the logic function (invert / pass / hold) and the two delays are checked.
module tb_xor4t_cell;
  timeunit 1ps; timeprecision 1fs;

  localparam realtime TI = 20.0;
  localparam realtime TB = 40.0;

  logic in, c, c_n, out;
  int checks = 0, failures = 0;

  xor4t_cell #(.INV_DELAY(TI), .BUF_DELAY(TB)) dut (.in(in), .c(c), .c_n(c_n), .out(out));

  task automatic check(input logic exp, input string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s: out=%0b expected %0b at %t", what, out, exp, $realtime);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 0; c = 0; c_n = 1;
    #100;
    c = 1; c_n = 0;
    #200;
    check(1'b1, "inverter, in=0");
    for (int k = 0; k < 20; k++) begin
      logic nv;
      nv = ~in;
      // inverter mode
      c = 1; c_n = 0; #200;
      in = nv; #(TI - 2.0);
      check(~(~nv), "inverter holds old value before delay");
      #4.0;
      check(~nv, "inverter after delay");
      // buffer mode
      c = 0; c_n = 1; #200;
      check(nv, "buffer settled");
      in = ~nv; #(TB - 2.0);
      check(nv, "buffer holds old value before delay");
      #4.0;
      check(~nv, "buffer after delay");
      // illegal rails: output floats and keeps its value
      c = 1; c_n = 1; #5;
      in = nv; #100;
      check(~nv, "hold with c=c_n=1");
      c = 0; c_n = 0; #5;
      in = ~nv; #100;
      check(~nv, "hold with c=c_n=0");
      in = nv;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
