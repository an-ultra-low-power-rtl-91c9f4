// tb_puf_controller: drives the controller with a behavioural stand-in for
// the PUF instances (done after a random delay, response = a fixed function
// of the challenge) and a receiver with random ready delays. A reference
// LFSR and ones count predict every challenge. Checks:
//   * the serially loaded seed and the skipping of disallowed LFSR values:
//     each applied challenge is the next allowed value of the reference
//     sequence, in both modes;
//   * the challenge lines are all zero whenever start is low;
//   * resp_word / chal_word carry the stand-in's response and the challenge;
//   * the controller waits for every done before storing.
module tb_puf_controller;
  timeunit 1ps; timeprecision 1fs;
  localparam int W = 25;
  localparam int NP = 8;

  logic clk = 0, rst_n = 0, load = 0, seed = 0, run = 0, mode_n = 0;
  logic [4:0] n_target = 5'd17;
  logic [W-1:0] chal, chal_word;
  logic start;
  logic [NP-1:0] puf_done, puf_resp, resp_word;
  logic resp_valid, resp_ready = 0, busy;
  logic [W-1:0] ref_q;
  int checks = 0, failures = 0, cycles = 0;
  int skipped = 0, applied = 0, ones_hist [26];

  puf_controller #(.W(W), .N_PUF(NP)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .run(run), .mode_n(mode_n),
    .n_target(n_target), .chal(chal), .start(start), .puf_done(puf_done),
    .puf_resp(puf_resp), .resp_word(resp_word), .chal_word(chal_word),
    .resp_valid(resp_valid), .resp_ready(resp_ready), .busy(busy));

  always #5000 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic logic [NP-1:0] fake_resp(input logic [W-1:0] ch);
    return NP'(puf_pkg::mix32(32'(ch)));
  endfunction

  function automatic bit allowed(input logic [W-1:0] v, input logic m, input int n);
    int k;
    k = $countones(v);
    return m ? (k == n) : (k % 2 == 1 && k >= 3);
  endfunction

  // Behavioural PUF instances: done rises 3..12 clocks after start, each
  // instance on its own, and falls one clock after start falls.
  for (genvar g = 0; g < NP; g++) begin : g_fake
    int dly;
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        puf_done[g] <= 1'b0; puf_resp[g] <= 1'b0; dly = 0;
      end else if (!start) begin
        puf_done[g] <= 1'b0; dly = 3 + (($urandom() >> 4) % 10);
      end else if (dly > 0) begin
        dly--;
      end else begin
        puf_done[g] <= 1'b1;
        puf_resp[g] <= fake_resp(chal)[g];
      end
    end
  end

  // Challenge lines must be zero outside a measurement.
  always @(negedge clk) if (rst_n) begin
    if (!start && chal !== '0) begin
      failures++; $display("FAIL challenge not zero while idle: %h", chal);
    end
    if (start && chal !== '0 && !allowed(chal, mode_n, int'(n_target))) begin
      failures++; $display("FAIL disallowed challenge applied: %b", chal);
    end
  end

  initial begin
    wait (cycles == 2_000_000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic next_allowed();
    while (!allowed(ref_q, mode_n, int'(n_target))) begin
      ref_q = {ref_q[W-2:0], ref_q[2] ^ ref_q[W-1]};
      skipped++;
    end
  endtask

  task automatic collect(input int count);
    for (int k = 0; k < count; k++) begin
      next_allowed();
      // wait for the stored response
      do @(posedge clk); while (!resp_valid);
      #1;
      checks++;
      if (chal_word !== ref_q || resp_word !== fake_resp(ref_q)) begin
        failures++;
        $display("FAIL pair %0d: chal %h (ref %h) resp %h (ref %h)", k, chal_word, ref_q,
                 resp_word, fake_resp(ref_q));
      end
      applied++;
      ones_hist[$countones(ref_q)]++;
      // random receiver delay
      repeat ($urandom_range(0, 4)) @(negedge clk);
      @(negedge clk); resp_ready = 1;
      @(negedge clk); resp_ready = 0;
      ref_q = {ref_q[W-2:0], ref_q[2] ^ ref_q[W-1]};
    end
  endtask

  initial begin
    logic [W-1:0] s;
    foreach (ones_hist[i]) ones_hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    s = 25'h0_0000 | W'($urandom()) | 25'h1;
    for (int i = W - 1; i >= 0; i--) begin
      @(negedge clk); load = 1; seed = s[i];
    end
    @(negedge clk); load = 0;
    ref_q = s;
    // mode (a): any odd number of ones between 3 and 25
    mode_n = 0;
    run = 1;
    collect(150);
    // mode (b): exactly n ones, for each of the user values
    for (int m = 0; m < 4; m++) begin
      run = 0;
      do @(posedge clk); while (busy);
      mode_n = 1;
      n_target = 5'(15 + 2 * m);
      @(negedge clk); run = 1;
      collect(6);
    end
    run = 0;
    do @(posedge clk); while (busy);
    checks++;
    if (skipped < 100) begin failures++; $display("FAIL only %0d skipped values", skipped); end
    checks++;
    if (ones_hist[3] + ones_hist[5] + ones_hist[7] == 0 || ones_hist[15] == 0 || ones_hist[21] == 0) begin
      failures++; $display("FAIL weight coverage");
    end
    $display("pairs=%0d skipped=%0d", applied, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
