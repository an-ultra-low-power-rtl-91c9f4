// config_ro: behavioural model of the reconfigurable ring oscillator.
// Not synthesizable logic: it is a closed combinational loop with delays that
// stands for a transistor-level ring, and is used only to simulate the PUF.
//
// N_STAGES 4T XOR cells (xor4t_cell) are chained; the last cell's output is
// fed back through a 2-input AND gate with 'en' into the first cell. Stage i
// inverts when c[i]=1 and buffers when c[i]=0, so the ring oscillates only
// when the challenge has an odd number of ones and en=1. With en=0 and an
// all-zero challenge every node settles to 0, which is the idle state in
// which no PMOS sees a gate-source stress.
//
// Each stage gets its own inverter-mode and buffer-mode delay from
// puf_pkg::puf_pkg::stage_delay_ps(SEED, i, ...), a deterministic stand-in for
// process variation; SEED therefore selects one simulated ring on one die.
// The ring structure follows the design description; the delay values and
// the variation model are this model's own.
//
// Ports: en, c/c_n (control rails), ro_out (last stage output). The loop is a
// combinational loop by construction: that loop is the oscillator, so the
// combinational-loop warning of lint tools is expected here and in every
// module that instantiates a ring.
module config_ro
#(
  parameter int unsigned N    = puf_pkg::N_STAGES,
  parameter int unsigned SEED = 0
) (
  input  logic         en,
  input  logic [N-1:0] c,
  input  logic [N-1:0] c_n,
  output logic         ro_out
);
  timeunit 1ps; timeprecision 1fs;

  localparam realtime AND_DELAY = realtime'(puf_pkg::AND_DELAY_FS) / 1000.0;

  logic [N:0] node;

  assign #(AND_DELAY) node[0] = en & node[N];

  for (genvar i = 0; i < N; i++) begin : g_stage
    xor4t_cell #(
      .INV_DELAY(puf_pkg::stage_delay_ps(SEED, i, 1'b1)),
      .BUF_DELAY(puf_pkg::stage_delay_ps(SEED, i, 1'b0))
    ) u_cell (
      .in (node[i]),
      .c  (c[i]),
      .c_n(c_n[i]),
      .out(node[i+1])
    );
  end

  assign ro_out = node[N];
endmodule
