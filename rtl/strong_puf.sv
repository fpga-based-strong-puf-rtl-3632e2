// strong_puf: N_BITS-bit Strong PUF built from flip-flop delay chains.
//
// Every response bit comes from its own 1-bit response cell; all cells get
// the same challenge, START and CLEAR, and differ only in the physical
// delays of their flip-flops. The default is the configuration measured on
// the Artix-7 boards: a 64-bit response, 64 stages per path and M = 2
// delay elements per stage, hence a 64-bit challenge. DEVICE_SEED selects
// the simulated device (see strong_puf_pkg); it does not exist in hardware.
//
// Use: hold start low, pulse clear high, apply the challenge, then raise
// start. Every response bit is final once both path outputs of its cell
// have risen, at most N_STAGES * (largest element delay) after start.
// Repeat from the clear pulse for the next challenge.
//
// Interface: start, clear, challenge[N_STAGES*log2(M)-1:0], response,
// q_upper / q_lower (Q^U and Q^L of every cell: when both are high for
// every bit, the whole response has settled).
// No clock: the circuit is asynchronous and sampled by the user after the
// race has settled.
module strong_puf #(
  parameter int unsigned N_BITS      = 64,
  parameter int unsigned N_STAGES    = 64,
  parameter int unsigned M           = 2,
  parameter int unsigned K           = (M > 1) ? $clog2(M) : 1,
  parameter int unsigned DEVICE_SEED = 1
) (
  input  logic                  start,
  input  logic                  clear,
  input  logic [N_STAGES*K-1:0] challenge,
  output logic [N_BITS-1:0]     response,
  output logic [N_BITS-1:0]     q_upper,
  output logic [N_BITS-1:0]     q_lower
);
  timeunit 1ps;
  timeprecision 1ps;

  for (genvar b = 0; b < int'(N_BITS); b++) begin : g_bit
    puf_response_cell #(
      .N_STAGES (N_STAGES),
      .M        (M),
      .K        (K),
      .SEED     (DEVICE_SEED),
      .BIT_IDX  (b)
    ) u_cell (
      .start     (start),
      .clr       (clear),
      .challenge (challenge),
      .r         (response[b]),
      .q_u       (q_upper[b]),
      .q_l       (q_lower[b])
    );
  end
endmodule
