// tb_ones_checker: random candidates with a controlled number of ones, in
// both modes, against a reference population count.
module tb_ones_checker;
  timeunit 1ps; timeprecision 1fs;
  localparam int W = 25;
  logic [W-1:0] cand;
  logic mode_n;
  logic [4:0] n_target, ones;
  logic valid;
  int checks = 0, failures = 0;

  ones_checker #(.W(W)) dut (.cand(cand), .mode_n(mode_n), .n_target(n_target),
                             .ones(ones), .valid(valid));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      int want, cnt;
      logic exp;
      want = $urandom_range(0, W);
      cand = '0;
      cnt = 0;
      while (cnt < want) begin
        int p;
        p = $urandom_range(0, W - 1);
        if (!cand[p]) begin cand[p] = 1'b1; cnt++; end
      end
      mode_n = k[0];
      case ($urandom_range(0, 3))
        0: n_target = 5'd15;
        1: n_target = 5'd17;
        2: n_target = 5'd19;
        default: n_target = 5'd21;
      endcase
      if (k % 7 == 0) n_target = 5'(want);
      #5;
      if (mode_n) exp = (want == int'(n_target));
      else        exp = (want % 2 == 1) && (want >= 3);
      checks++;
      if (valid !== exp || ones !== 5'(want)) begin
        failures++;
        $display("FAIL cand=%b mode_n=%0b n=%0d valid=%0b ones=%0d", cand, mode_n, n_target, valid, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
