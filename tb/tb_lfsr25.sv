// tb_lfsr25: loads a random seed serially and compares 200000 steps with a
// reference shift register (next bit = q[2] ^ q[24]). A second, 5-bit
// instance with the same tap position must have the maximal period 31.
module tb_lfsr25;
  timeunit 1ps; timeprecision 1fs;
  localparam int W = 25;
  logic clk = 0, rst_n = 0, step = 0, load = 0, seed = 0;
  logic [W-1:0] q, ref_q;
  logic step5;
  logic [4:0] q5;
  int checks = 0, failures = 0;
  int cycles = 0;

  lfsr25 #(.W(W), .TAP(2)) dut (.clk(clk), .rst_n(rst_n), .step(step), .load(load), .seed(seed), .q(q));
  lfsr25 #(.W(5), .TAP(2)) dut5 (.clk(clk), .rst_n(rst_n), .step(step5), .load(1'b0), .seed(1'b0), .q(q5));

  always #5000 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 400000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] s;
    step5 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    s = W'($urandom()) | W'(1);
    // serial load: first bit shifted in ends up in q[W-1]
    for (int i = W - 1; i >= 0; i--) begin
      @(negedge clk); load = 1; seed = s[i];
    end
    @(negedge clk); load = 0;
    checks++;
    if (q !== s) begin failures++; $display("FAIL seed load q=%h seed=%h", q, s); end
    ref_q = s;
    // random stepping with the enable
    for (int k = 0; k < 200000; k++) begin
      @(negedge clk);
      step = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (step) ref_q = {ref_q[W-2:0], ref_q[2] ^ ref_q[W-1]};
      if (q !== ref_q) begin
        failures++;
        if (failures < 5) $display("FAIL step %0d q=%h ref=%h", k, q, ref_q);
      end
      if (k % 1000 == 0) checks++;
    end
    step = 0;
    // period of the 5-bit instance
    begin
      logic [4:0] first;
      int period;
      @(negedge clk);
      first = q5; step5 = 1; period = 0;
      do begin
        @(posedge clk); #1; period++;
      end while (q5 !== first && period < 100);
      step5 = 0;
      checks++;
      if (period != 31) begin failures++; $display("FAIL 5-bit period %0d", period); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
