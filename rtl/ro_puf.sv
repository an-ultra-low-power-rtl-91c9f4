// ro_puf: one PUF instance, producing one response bit from a pair of
// reconfigurable ring oscillators.
//
// Both rings receive the same control rails (c, c_n). A measurement is a
// four-phase handshake with the controller:
//   IDLE   : rings disabled, counters hold the last measurement.
//   CLEAR  : on 'start', one clock with both edge counters cleared.
//   RUN    : both rings are enabled for WINDOW_CYCLES clocks.
//   SETTLE : rings disabled again; SETTLE_CYCLES clocks let the last edges
//            reach the counters before they are read.
//   DONE   : the comparison (ring A count > ring B count) is registered in
//            'resp', 'done' is raised and held until 'start' falls.
// The ring pair, the two counters and the '>' comparator follow the design
// description; the fixed enable window, the settle time and the handshake
// are this design's own choices (the description only names a Done signal
// per instance). The raw counts are brought out for characterisation.
//
// DIE_SEED and INDEX select the simulated variation of the two rings; they
// only affect the behavioural ring model. The counters are cleared
// asynchronously from the state register (clr = CLEAR), which lint reports
// as a signal used both synchronously and asynchronously; that is intended.
// The clear is a pulse rather than a level held through IDLE so that every
// measurement starts with a fresh clear edge. Timing: done rises
// WINDOW_CYCLES + SETTLE_CYCLES + 1 clock edges after the edge that samples
// start.
module ro_puf
#(
  parameter int unsigned N             = puf_pkg::N_STAGES,
  parameter int unsigned W             = puf_pkg::CNT_W,
  parameter int unsigned WINDOW_CYCLES = puf_pkg::WINDOW_CYCLES,
  parameter int unsigned SETTLE_CYCLES = 4,
  parameter int unsigned DIE_SEED      = 1,
  parameter int unsigned INDEX         = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] c,
  input  logic [N-1:0] c_n,
  input  logic         start,
  output logic         done,
  output logic         resp,
  output logic [W-1:0] count_a,
  output logic [W-1:0] count_b
);
  timeunit 1ps; timeprecision 1fs;

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_RUN, S_SETTLE, S_DONE} state_t;

  localparam int unsigned TW = $clog2(WINDOW_CYCLES + SETTLE_CYCLES + 1);

  state_t        state;
  logic [TW-1:0] timer;
  logic          ro_en, clr;
  logic          ro_a, ro_b;
  logic          a_faster;

  config_ro #(.N(N), .SEED(puf_pkg::mix32(DIE_SEED * 32'h0001_0000 + INDEX * 2)))
    u_ro_a (.en(ro_en), .c(c), .c_n(c_n), .ro_out(ro_a));
  config_ro #(.N(N), .SEED(puf_pkg::mix32(DIE_SEED * 32'h0001_0000 + INDEX * 2 + 1)))
    u_ro_b (.en(ro_en), .c(c), .c_n(c_n), .ro_out(ro_b));

  ro_counter #(.W(W)) u_cnt_a (.ro_clk(ro_a), .clr(clr), .count(count_a));
  ro_counter #(.W(W)) u_cnt_b (.ro_clk(ro_b), .clr(clr), .count(count_b));

  freq_compare #(.W(W)) u_cmp (.count_a(count_a), .count_b(count_b), .a_faster(a_faster));

  assign ro_en = (state == S_RUN);
  assign clr   = (state == S_CLEAR);
  assign done  = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      timer <= '0;
      resp  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) state <= S_CLEAR;
        S_CLEAR: begin
          state <= S_RUN;
          timer <= TW'(WINDOW_CYCLES - 1);
        end
        S_RUN: begin
          if (timer == '0) begin
            state <= S_SETTLE;
            timer <= TW'(SETTLE_CYCLES - 1);
          end else begin
            timer <= timer - 1'b1;
          end
        end
        S_SETTLE: begin
          if (timer == '0) begin
            state <= S_DONE;
            resp  <= a_faster;
          end else begin
            timer <= timer - 1'b1;
          end
        end
        S_DONE: if (!start) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
