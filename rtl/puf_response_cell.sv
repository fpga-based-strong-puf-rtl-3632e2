// puf_response_cell: 1-bit response generation cell of the Strong PUF.
//
// An upper and a lower delay path of N_STAGES stages each, both launched by
// the same START edge, race to the arbiter. Each stage of each path picks
// one of its M flip-flop delay elements with K = log2(M) challenge bits;
// the lower path reads the challenge in reverse stage order, so the cell
// compares sum(upper delays) with sum(lower delays) over pairs chosen
// from M*M combinations per stage. R = 0 when the upper path is faster,
// R = 1 when the lower path is faster. This structure follows the PUF
// architecture; the bit polarity follows from taking R at the NAND latch
// output Z0.
//
// Interface: start (START, rising edge launches), clr (CLEAR, active high,
// asynchronous), challenge (N_STAGES*K bits, C0 is bit 0), r (response),
// q_u / q_l (path outputs; both high means the race is over).
// Timing: r is valid once the faster path output has risen; a new
// evaluation needs clr pulsed with start low, then a new start edge.
module puf_response_cell
  import strong_puf_pkg::*;
#(
  parameter int unsigned N_STAGES = 64,
  parameter int unsigned M        = 2,
  parameter int unsigned K        = (M > 1) ? $clog2(M) : 1,
  parameter int unsigned SEED     = 1,
  parameter int unsigned BIT_IDX  = 0
) (
  input  logic                  start,
  input  logic                  clr,
  input  logic [N_STAGES*K-1:0] challenge,
  output logic                  r,
  output logic                  q_u,
  output logic                  q_l
);
  timeunit 1ps;
  timeprecision 1ps;

  puf_delay_path #(
    .N_STAGES (N_STAGES), .M(M), .K(K),
    .PATH     (PATH_UPPER), .SEED(SEED), .BIT_IDX(BIT_IDX)
  ) u_upper (
    .start (start), .clr(clr), .challenge(challenge), .q_out(q_u)
  );

  puf_delay_path #(
    .N_STAGES (N_STAGES), .M(M), .K(K),
    .PATH     (PATH_LOWER), .SEED(SEED), .BIT_IDX(BIT_IDX)
  ) u_lower (
    .start (start), .clr(clr), .challenge(challenge), .q_out(q_l)
  );

  puf_arbiter u_arbiter (
    .q_u (q_u),
    .q_l (q_l),
    .r   (r)
  );
endmodule
