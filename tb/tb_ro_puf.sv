// tb_ro_puf: measures random odd-weight challenges on two PUF instances
// (default window) and checks, per measurement:
//   * done rises WINDOW_CYCLES + SETTLE_CYCLES + 2 clocks after start is
//     sampled, stays high while start is high and falls one clock after it;
//   * each ring's edge count is within one edge of window / reference period;
//   * the response bit is count_a > count_b, and equals the reference
//     comparison of the two periods whenever the expected counts differ by
//     more than two edges.
module tb_ro_puf;
  timeunit 1ps; timeprecision 1fs;
  import ring_ref_pkg::*;

  localparam int N = puf_pkg::N_STAGES;
  localparam int W = puf_pkg::CNT_W;
  localparam int WIN = puf_pkg::WINDOW_CYCLES;
  localparam int SETTLE = 4;
  localparam int unsigned DIE = 7;
  localparam realtime TCLK = 10_000.0;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] chal, c_n;
  logic start = 0;
  logic [1:0] done, resp;
  logic [W-1:0] ca [2];
  logic [W-1:0] cb [2];
  int checks = 0, failures = 0;
  int cycles = 0;

  assign c_n = ~chal;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    ro_puf #(.DIE_SEED(DIE), .INDEX(g * 5 + 3)) dut (
      .clk(clk), .rst_n(rst_n), .c(chal), .c_n(c_n), .start(start),
      .done(done[g]), .resp(resp[g]), .count_a(ca[g]), .count_b(cb[g]));
  end

  always #(TCLK / 2) clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    wait (cycles == 16 * (WIN + 40));
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int decided = 0;
    chal = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int k = 0; k < 12; k++) begin
      logic [63:0] ch;
      int lat;
      ch = chal_with_ones(N, 2 * $urandom_range(1, 12) + 1);
      @(negedge clk);
      chal = ch[N-1:0];
      start = 1;
      lat = 0;
      do begin @(posedge clk); #1; lat++; end while (!done[0] && lat < WIN + 50);
      checks++;
      if (lat != WIN + SETTLE + 2 || done[1] !== 1'b1) fail($sformatf("done latency %0d", lat));
      for (int g = 0; g < 2; g++) begin
        realtime pa, pb, ea, eb;
        pa = ring_period_ps(ring_seed(DIE, g * 5 + 3, 0), ch, N);
        pb = ring_period_ps(ring_seed(DIE, g * 5 + 3, 1), ch, N);
        ea = WIN * TCLK / pa;
        eb = WIN * TCLK / pb;
        checks++;
        if (real'(ca[g]) < ea - 1.01 || real'(ca[g]) > ea + 1.01 ||
            real'(cb[g]) < eb - 1.01 || real'(cb[g]) > eb + 1.01)
          fail($sformatf("counts %0d/%0d expected %f/%f", ca[g], cb[g], ea, eb));
        checks++;
        if (resp[g] !== (ca[g] > cb[g])) fail("response is not count_a > count_b");
        if (ea - eb > 2.0 || eb - ea > 2.0) begin
          decided++;
          checks++;
          if (resp[g] !== (pa < pb)) fail($sformatf("response %0b, periods %f %f", resp[g], pa, pb));
        end
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
      checks++;
      if (done !== 2'b11) fail("done dropped while start high");
      @(negedge clk);
      start = 0;
      chal = '0;
      @(posedge clk); #1;
      checks++;
      if (done !== 2'b00) fail("done not released");
      begin
        logic [W-1:0] ha, hb;
        ha = ca[0]; hb = cb[0];
        repeat (3) @(posedge clk); #1;
        checks++;
        if (ca[0] !== ha || cb[0] !== hb) fail("counts not held while idle");
      end
    end
    checks++;
    if (decided < 4) fail($sformatf("only %0d clearly decided responses", decided));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
