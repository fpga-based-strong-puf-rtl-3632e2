// puf_delay_stage: one stage of a PUF delay path (one FPGA slice).
//
// M delay elements share the stage's input as their clock and START/CLEAR
// style clear; an M:1 multiplexer, steered by the stage's K = log2(M)
// challenge bits, forwards the output of one element to the next stage.
// Which element is chosen therefore decides which delay this stage adds to
// the path. With M = 2 a stage is two flip-flops and one MUX, the contents
// of one slice in the FPGA layout. The M elements, common clock, clear and
// challenge-driven MUX follow the PUF architecture; the element ordering
// (challenge value j selects element j) is this design's choice.
//
// DELAY_PS packs the simulation-only delay of each element (element j in
// DELAY_PS[j]); see strong_puf_pkg.
//
// Interface: in_edge (rising edge launches the stage), clr, sel (K bits),
// out_edge (selected element output). Timing: out_edge rises
// DELAY_PS[sel] after in_edge rises; the MUX itself has no modelled delay.
module puf_delay_stage #(
  parameter int unsigned M = 2,
  parameter int unsigned K = (M > 1) ? $clog2(M) : 1,
  parameter logic [M-1:0][strong_puf_pkg::DELAY_W-1:0] DELAY_PS =
    {M{strong_puf_pkg::DELAY_W'(strong_puf_pkg::DELAY_NOMINAL_PS)}}
) (
  input  logic         in_edge,
  input  logic         clr,
  input  logic [K-1:0] sel,
  output logic         out_edge
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [M-1:0] elem_q;

  for (genvar j = 0; j < int'(M); j++) begin : g_elem
    puf_delay_ff #(
      .DELAY_PS(int'(DELAY_PS[j]))
    ) u_ff (
      .clk (in_edge),
      .clr (clr),
      .d   (1'b1),
      .q   (elem_q[j])
    );
  end

  // M:1 multiplexer; a select value beyond M-1 (M not a power of two)
  // picks element 0.
  always_comb begin
    out_edge = elem_q[0];
    for (int unsigned j = 1; j < M; j++)
      if (int'(sel) == int'(j)) out_edge = elem_q[j];
  end
endmodule
