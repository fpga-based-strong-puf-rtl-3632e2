// puf_delay_path: one delay path (T^U or T^L) of a 1-bit response cell.
//
// N_STAGES delay stages in a row. The first stage is clocked by START; the
// selected output of each stage clocks the next, so a single rising edge
// ripples down the path and arrives at q_out after the sum of the delays
// of the elements the challenge selected. Stage i takes K challenge bits:
//   upper path (PATH = PATH_UPPER): C[i*K +: K]            (C0..Ck-1 first)
//   lower path (PATH = PATH_LOWER): C[(N_STAGES-1-i)*K +: K] (reversed)
// so the two paths of a cell never pair the same challenge bits stage by
// stage. The chain, the clocking and the reversed order follow the PUF
// architecture; the parameters SEED and BIT_IDX only feed the simulation
// delay model (strong_puf_pkg) and have no hardware meaning.
//
// Interface: start (launch edge), clr (CLEAR), challenge (N_STAGES*K bits),
// q_out (Q^U or Q^L). Timing: q_out rises the sum of the selected element
// delays after start rises, and stays high until clr.
module puf_delay_path
  import strong_puf_pkg::*;
#(
  parameter int unsigned N_STAGES = 64,
  parameter int unsigned M        = 2,
  parameter int unsigned K        = (M > 1) ? $clog2(M) : 1,
  parameter path_e       PATH     = PATH_UPPER,
  parameter int unsigned SEED     = 1,
  parameter int unsigned BIT_IDX  = 0
) (
  input  logic                  start,
  input  logic                  clr,
  input  logic [N_STAGES*K-1:0] challenge,
  output logic                  q_out
);
  timeunit 1ps;
  timeprecision 1ps;

  typedef logic [M-1:0][DELAY_W-1:0] stage_delay_t;

  // Simulation delays of the M elements of stage `stage` on this path.
  function automatic stage_delay_t stage_delays(input int unsigned stage);
    stage_delay_t d;
    for (int unsigned j = 0; j < M; j++)
      d[j] = DELAY_W'(element_delay_ps(SEED, BIT_IDX, PATH, stage, j));
    return d;
  endfunction

  // edge_chain[i] clocks stage i; edge_chain[N_STAGES] is the path output.
  logic [N_STAGES:0] edge_chain;

  assign edge_chain[0] = start;

  for (genvar i = 0; i < int'(N_STAGES); i++) begin : g_stage
    localparam int unsigned CSTAGE = (PATH == PATH_UPPER) ? i : N_STAGES - 1 - i;

    puf_delay_stage #(
      .M        (M),
      .K        (K),
      .DELAY_PS (stage_delays(i))
    ) u_stage (
      .in_edge  (edge_chain[i]),
      .clr      (clr),
      .sel      (challenge[CSTAGE*K +: K]),
      .out_edge (edge_chain[i+1])
    );
  end

  assign q_out = edge_chain[N_STAGES];
endmodule
