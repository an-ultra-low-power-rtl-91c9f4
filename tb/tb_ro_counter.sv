// tb_ro_counter: random bursts of edges on the ring clock; the count must
// equal the number of rising edges, clear asynchronously, and saturate.
module tb_ro_counter;
  timeunit 1ps; timeprecision 1fs;
  localparam int W = 6;
  logic ro_clk, clr;
  logic [W-1:0] count;
  int checks = 0, failures = 0;

  ro_counter #(.W(W)) dut (.ro_clk(ro_clk), .clr(clr), .count(count));

  task automatic expect_count(input int exp, input string what);
    checks++;
    if (count !== W'(exp)) begin
      failures++;
      $display("FAIL %s: count=%0d expected %0d", what, count, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ro_clk = 0; clr = 0; #10;
    clr = 1; #40;
    expect_count(0, "after clear");
    clr = 0; #50;
    for (int k = 0; k < 40; k++) begin
      int n, exp;
      n = $urandom_range(0, 90);
      for (int e = 0; e < n; e++) begin
        #7 ro_clk = 1; #7 ro_clk = 0;
      end
      #5;
      exp = (n > 2**W - 1) ? 2**W - 1 : n;
      expect_count(exp, "after burst");
      clr = 1; #5;
      expect_count(0, "asynchronous clear");
      clr = 0; #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
