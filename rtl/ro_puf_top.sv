// ro_puf_top: complete configurable RO PUF with challenge generator and
// serial read-out.
//
// Structure:
//   puf_controller   25-bit LFSR, ones checker, challenge mux, sequencing
//   challenge_driver shared complement rails c / c_n for every ring stage
//   ro_puf x N_PUF   one RO pair, two counters and a comparator per bit;
//                    all instances see the same challenge, so one challenge
//                    yields an N_PUF-bit response
//   uart_tx          sends each response, least significant byte first
// Operation: shift a 25-bit seed in with load/seed (one bit per clock), then
// raise run. The controller skips LFSR values whose number of ones is not
// allowed (mode_n=0: any odd count from 3 to 25; mode_n=1: exactly
// n_target), measures every allowed challenge on all instances in parallel
// and presents each response on resp_word/chal_word with a one-cycle-or-
// longer resp_valid while the UART takes it. One challenge-response pair
// costs about WINDOW_CYCLES + SETTLE + a few clocks plus the UART time.
// The number of instances, ring length and challenge width follow the
// design description; DIE_SEED selects the simulated die (ring variation).
module ro_puf_top
#(
  parameter int unsigned N_STAGES      = puf_pkg::N_STAGES,
  parameter int unsigned N_PUF         = puf_pkg::N_PUF,
  parameter int unsigned W_CNT         = puf_pkg::CNT_W,
  parameter int unsigned WINDOW        = puf_pkg::WINDOW_CYCLES,
  parameter int unsigned CLKS_PER_BIT  = 868,
  parameter int unsigned DIE_SEED      = 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          load,
  input  logic                          seed,
  input  logic                          run,
  input  logic                          mode_n,
  input  logic [$clog2(N_STAGES+1)-1:0] n_target,
  output logic [N_PUF-1:0]              resp_word,
  output logic [N_STAGES-1:0]           chal_word,
  output logic                          resp_valid,
  output logic                          busy,
  output logic                          uart_txd
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned NBYTES = (N_PUF + 7) / 8;

  logic [N_STAGES-1:0] chal, c, c_n;
  logic                start;
  logic [N_PUF-1:0]    puf_done, puf_resp;
  logic                word_ready;

  puf_controller #(.W(N_STAGES), .N_PUF(N_PUF)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .run(run),
    .mode_n(mode_n), .n_target(n_target), .chal(chal), .start(start),
    .puf_done(puf_done), .puf_resp(puf_resp), .resp_word(resp_word),
    .chal_word(chal_word), .resp_valid(resp_valid), .resp_ready(word_ready),
    .busy(busy)
  );

  challenge_driver #(.N(N_STAGES)) u_drv (.chal(chal), .c(c), .c_n(c_n));

  for (genvar i = 0; i < N_PUF; i++) begin : g_puf
    logic [W_CNT-1:0] cnt_a, cnt_b;
    ro_puf #(
      .N(N_STAGES), .W(W_CNT), .WINDOW_CYCLES(WINDOW),
      .DIE_SEED(DIE_SEED), .INDEX(i)
    ) u_puf (
      .clk(clk), .rst_n(rst_n), .c(c), .c_n(c_n), .start(start),
      .done(puf_done[i]), .resp(puf_resp[i]), .count_a(cnt_a), .count_b(cnt_b)
    );
  end

  uart_tx #(.NBYTES(NBYTES), .CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk(clk), .rst_n(rst_n), .word((8*NBYTES)'(resp_word)),
    .word_valid(resp_valid), .word_ready(word_ready), .txd(uart_txd)
  );
endmodule
