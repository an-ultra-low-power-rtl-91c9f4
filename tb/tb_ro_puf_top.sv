// tb_ro_puf_top: end-to-end run of the whole PUF at reduced size (8 PUF
// instances, 32-clock window, 8 clocks per UART bit). A seed is shifted in,
// challenge-response pairs are collected in both challenge modes, and each
// pair is checked against independent references:
//   * the challenge is the next allowed value of a reference LFSR;
//   * every response bit whose two rings differ by more than two expected
//     edges equals the reference period comparison;
//   * the bytes decoded from the serial line equal the response word.
// It also counts the mechanisms of the design and fails if one never
// happened: disallowed LFSR values skipped, measurements, serial words,
// the switch to "exactly n ones" mode, and the rest state (all-zero
// challenge and every ring node at 0 while idle).
module tb_ro_puf_top;
  timeunit 1ps; timeprecision 1fs;
  import ring_ref_pkg::*;

  localparam int N = 25;
  localparam int NP = 8;
  localparam int WIN = 32;
  localparam int CPB = 8;
  localparam int unsigned DIE = 3;
  localparam int PAIRS_A = 6;
  localparam int PAIRS_B = 2;
  localparam realtime TCLK = 10_000.0;

  logic clk = 0, rst_n = 0, load = 0, seed = 0, run = 0, mode_n = 0;
  logic [4:0] n_target = 5'd17;
  logic [NP-1:0] resp_word;
  logic [N-1:0] chal_word;
  logic resp_valid, busy, txd;
  int checks = 0, failures = 0, cycles = 0;
  int n_skip = 0, n_meas = 0, n_uart = 0, n_mode_b = 0, n_rest = 0, n_decided = 0;
  logic [N-1:0] ref_q;
  logic [7:0] rx_bytes [$];
  logic [NP-1:0] sent_words [$];   // words handed to the serial sender
  logic [NP-1:0] pair_resp [$];    // stored responses, in order
  logic [N-1:0]  pair_chal [$];

  ro_puf_top #(.N_PUF(NP), .WINDOW(WIN), .CLKS_PER_BIT(CPB), .DIE_SEED(DIE)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .run(run), .mode_n(mode_n),
    .n_target(n_target), .resp_word(resp_word), .chal_word(chal_word),
    .resp_valid(resp_valid), .busy(busy), .uart_txd(txd));

  always #(TCLK / 2) clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic bit allowed(input logic [N-1:0] v, input logic m, input int n);
    int k;
    k = $countones(v);
    return m ? (k == n) : (k % 2 == 1 && k >= 3);
  endfunction

  // serial receiver, 8N1, sampling at bit centres
  initial begin
    wait (rst_n);
    repeat (2) @(posedge clk);
    forever begin
      logic [9:0] f;
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 10; i++) begin
        f[i] = txd;
        if (i < 9) repeat (CPB) @(posedge clk);
      end
      if (f[0] !== 1'b0 || f[9] !== 1'b1) begin
        failures++; $display("FAIL serial framing %b", f);
      end
      rx_bytes.push_back(f[8:1]);
      if (rx_bytes.size() == (NP + 7) / 8) begin
        logic [NP-1:0] w;
        w = sent_words.pop_front();
        for (int b = 0; b < (NP + 7) / 8; b++) begin
          logic [7:0] exp, got;
          exp = 8'(w >> (8 * b));
          got = rx_bytes.pop_front();
          checks++;
          if (got !== exp) begin
            failures++; $display("FAIL serial byte %0d = %h, expected %h", b, got, exp);
          end
        end
        n_uart++;
      end
    end
  end

  // every accepted response transfer
  always @(posedge clk) if (rst_n && resp_valid && dut.word_ready) begin
    sent_words.push_back(resp_word);
    pair_resp.push_back(resp_word);
    pair_chal.push_back(chal_word);
  end

  // rest state: challenge lines zero and ring nodes at 0 while idle
  always @(posedge clk) if (rst_n && !busy && cycles > 20) begin
    if (dut.u_ctrl.chal !== '0 || dut.g_puf[0].u_puf.u_ro_a.node !== '0 ||
        dut.g_puf[NP-1].u_puf.u_ro_b.node !== '0) begin
      failures++; $display("FAIL rings not at rest while idle");
    end else n_rest++;
  end

  initial begin
    wait (cycles == 60 * (WIN + 30 + 50 * CPB));
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic collect(input int count);
    for (int k = 0; k < count; k++) begin
      logic [N-1:0] chal;
      logic [NP-1:0] resp;
      while (!allowed(ref_q, mode_n, int'(n_target))) begin
        ref_q = {ref_q[N-2:0], ref_q[2] ^ ref_q[N-1]};
        n_skip++;
      end
      wait (pair_chal.size() > 0);
      chal = pair_chal.pop_front();
      resp = pair_resp.pop_front();
      n_meas++;
      if (mode_n) n_mode_b++;
      checks++;
      if (chal !== ref_q) begin
        failures++; $display("FAIL challenge %h, reference %h", chal, ref_q);
      end
      for (int g = 0; g < NP; g++) begin
        realtime pa, pb, ea, eb;
        pa = ring_period_ps(ring_seed(DIE, g, 0), 64'(ref_q), N);
        pb = ring_period_ps(ring_seed(DIE, g, 1), 64'(ref_q), N);
        ea = WIN * TCLK / pa;
        eb = WIN * TCLK / pb;
        if (ea - eb > 2.0 || eb - ea > 2.0) begin
          n_decided++;
          checks++;
          if (resp[g] !== (pa < pb)) begin
            failures++; $display("FAIL bit %0d = %0b, periods %f %f", g, resp[g], pa, pb);
          end
        end
      end
      ref_q = {ref_q[N-2:0], ref_q[2] ^ ref_q[N-1]};
    end
  endtask

  initial begin
    logic [N-1:0] s;
    repeat (3) @(posedge clk);
    rst_n = 1;
    s = N'($urandom()) | N'(1);
    for (int i = N - 1; i >= 0; i--) begin
      @(negedge clk); load = 1; seed = s[i];
    end
    @(negedge clk); load = 0;
    ref_q = s;
    run = 1;
    collect(PAIRS_A);
    run = 0;
    do @(posedge clk); while (busy);
    repeat (5) @(posedge clk);
    mode_n = 1;
    n_target = 5'd19;
    @(negedge clk); run = 1;
    collect(PAIRS_B);
    run = 0;
    do @(posedge clk); while (busy);
    wait (dut.word_ready);
    repeat (2 * CPB) @(posedge clk);
    checks++;
    if (sent_words.size() != 0) begin failures++; $display("FAIL words not sent"); end
    $display("skipped=%0d measured=%0d serial_words=%0d mode_b=%0d rest_cycles=%0d decided_bits=%0d",
             n_skip, n_meas, n_uart, n_mode_b, n_rest, n_decided);
    checks++;
    if (n_skip == 0 || n_meas == 0 || n_uart == 0 || n_mode_b == 0 || n_rest == 0 || n_decided == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
