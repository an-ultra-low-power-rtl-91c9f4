// puf_controller: generates challenges with an odd number of ones, applies
// them to all PUF instances and collects the responses.
//
// Flow (one challenge-response pair):
//   1. The 25-bit LFSR (lfsr25) holds a candidate; ones_checker tests it.
//   2. If the candidate is not allowed, the LFSR steps to the next value on
//      the next clock (one candidate per clock).
//   3. An allowed candidate is applied through the challenge mux and 'start'
//      is raised to every PUF instance.
//   4. When every instance reports done, the response bits are stored in
//      'resp_word' together with the challenge ('chal_word') and offered on
//      resp_valid/resp_ready.
//      This happens after 'start' has fallen and every instance has
//      released done (four-phase handshake).
//   5. When the word is accepted the LFSR steps and the flow repeats while
//      'run' is high.
// The challenge mux drives all zeros whenever no measurement is in progress,
// so idle rings sit in the all-buffer, no-stress configuration.
// 'load' shifts 'seed' serially into the LFSR (one bit per clock, W clocks
// for a full seed) and is honoured only while idle.
// mode_n / n_target select the rule: any odd number of ones from 3 to 25, or
// exactly n_target ones.
// The LFSR, checker, mux and the "all done" condition follow the published
// controller; the explicit state machine, the valid/ready output and the
// zeroing of the challenge while idle are this design's choices.
module puf_controller
#(
  parameter int unsigned W     = puf_pkg::CHAL_W,
  parameter int unsigned N_PUF = puf_pkg::N_PUF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic                   seed,
  input  logic                   run,
  input  logic                   mode_n,
  input  logic [$clog2(W+1)-1:0] n_target,
  output logic [W-1:0]           chal,
  output logic                   start,
  input  logic [N_PUF-1:0]       puf_done,
  input  logic [N_PUF-1:0]       puf_resp,
  output logic [N_PUF-1:0]       resp_word,
  output logic [W-1:0]           chal_word,
  output logic                   resp_valid,
  input  logic                   resp_ready,
  output logic                   busy
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned CW = $clog2(W + 1);

  typedef enum logic [2:0] {S_IDLE, S_SEARCH, S_MEASURE, S_RELEASE, S_STORE} state_t;

  state_t        state;
  logic [W-1:0]  lfsr_q;
  logic [CW-1:0] ones;
  logic          valid;
  logic          step;
  logic          all_done, any_done;

  assign all_done = &puf_done;
  assign any_done = |puf_done;

  lfsr25 #(.W(W)) u_lfsr (
    .clk(clk), .rst_n(rst_n), .step(step), .load(load && state == S_IDLE),
    .seed(seed), .q(lfsr_q)
  );

  ones_checker #(.W(W)) u_chk (
    .cand(lfsr_q), .mode_n(mode_n), .n_target(n_target), .ones(ones), .valid(valid)
  );

  // Challenge mux: LFSR bits during a measurement, ground otherwise.
  assign chal  = (state == S_MEASURE && valid) ? lfsr_q : '0;
  assign start = (state == S_MEASURE);
  assign busy  = (state != S_IDLE);
  assign resp_valid = (state == S_STORE);

  always_comb begin
    step = 1'b0;
    unique case (state)
      S_SEARCH: step = !valid;
      S_STORE:  step = resp_ready;
      default:  step = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      resp_word <= '0;
      chal_word <= '0;
    end else begin
      unique case (state)
        S_IDLE:    if (run && !load) state <= S_SEARCH;
        S_SEARCH:  if (!run) state <= S_IDLE;
                   else if (valid) state <= S_MEASURE;
        S_MEASURE: if (all_done) begin
                     resp_word <= puf_resp;
                     chal_word <= lfsr_q;
                     state     <= S_RELEASE;
                   end
        S_RELEASE: if (!any_done) state <= S_STORE;
        S_STORE:   if (resp_ready) state <= run ? S_SEARCH : S_IDLE;
        default:   state <= S_IDLE;
      endcase
    end
  end

  // A challenge is applied only if it has an allowed number of ones.
  a_chal_odd: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_MEASURE) |-> valid);
endmodule
