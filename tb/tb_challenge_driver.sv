// tb_challenge_driver: random challenges; c must equal the challenge and
// c_n its complement on every bit.
module tb_challenge_driver;
  timeunit 1ps; timeprecision 1fs;
  localparam int N = 25;
  logic [N-1:0] chal, c, c_n;
  int checks = 0, failures = 0;

  challenge_driver #(.N(N)) dut (.chal(chal), .c(c), .c_n(c_n));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      chal = N'($urandom());
      if (k == 0) chal = '0;
      if (k == 1) chal = '1;
      #10;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (c[i] !== chal[i] || c_n[i] !== !chal[i]) begin
          failures++;
          $display("FAIL bit %0d chal=%b c=%b c_n=%b", i, chal[i], c[i], c_n[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
