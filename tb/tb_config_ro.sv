// tb_config_ro: enables the ring for a fixed time with random challenges of
// 3..25 (odd) ones and compares the number of rising output edges with the
// time divided by the reference period (within one edge). Also checks that
// an even number of inverting stages does not oscillate and that the
// disabled, all-buffer ring rests with every output at 0.
module tb_config_ro;
  timeunit 1ps; timeprecision 1fs;
  import ring_ref_pkg::*;

  localparam int N = 25;
  localparam int unsigned SEED = 32'h1234_5678;
  localparam realtime T_ON = 50_000.0;

  logic en;
  logic [N-1:0] c, c_n;
  logic ro_out;
  int edges;
  int checks = 0, failures = 0;

  config_ro #(.N(N), .SEED(SEED)) dut (.en(en), .c(c), .c_n(c_n), .ro_out(ro_out));
  assign c_n = ~c;

  always @(posedge ro_out) edges++;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; c = '0; edges = 0;
    #5000;
    checks++;
    if (ro_out !== 1'b0 || dut.node !== '0) begin
      failures++;
      $display("FAIL idle ring not at rest: node=%b", dut.node);
    end
    for (int k = 0; k < 24; k++) begin
      int unsigned ones;
      logic [63:0] ch;
      realtime p, expct;
      ones = (k < 12) ? 3 + 2 * (k % 12) : 2 * $urandom_range(1, 12) + 1;
      ch = chal_with_ones(N, ones);
      c = ch[N-1:0];
      #2000;
      edges = 0;
      en = 1;
      #(T_ON);
      en = 0;
      #2000;
      p = ring_period_ps(SEED, ch, N);
      expct = T_ON / p;
      checks++;
      if (real'(edges) < expct - 1.01 || real'(edges) > expct + 1.01) begin
        failures++;
        $display("FAIL ones=%0d edges=%0d expected %f (period %f ps)", ones, edges, expct, p);
      end
    end
    // even number of inverting stages: the ring latches instead of oscillating
    for (int k = 0; k < 4; k++) begin
      logic [63:0] ch;
      ch = chal_with_ones(N, 2 * (k + 1) * 2);
      c = ch[N-1:0];
      #2000;
      edges = 0; en = 1; #(T_ON); en = 0; #2000;
      checks++;
      if (edges > 1) begin
        failures++;
        $display("FAIL even challenge oscillated: %0d edges", edges);
      end
    end
    c = '0; #5000;
    checks++;
    if (dut.node !== '0) begin
      failures++;
      $display("FAIL disabled all-buffer ring not at rest: node=%b", dut.node);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
