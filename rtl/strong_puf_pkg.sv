// strong_puf_pkg: constants and the delay-variation model shared by the
// Strong PUF modules.
//
// The PUF turns manufacturing variation of flip-flop clock-to-output and
// routing delays into response bits. Logic simulation has no process
// variation, so every delay element carries a simulation-only delay that
// this package derives from a per-device seed and the element's position
// (response bit, path, stage, element). A different seed stands for a
// different chip carrying the same bitstream. Synthesis ignores these
// delays; on silicon the delays are whatever the device has.
//
// Model (this design's own choice, the figures are not from any measured
// device): delay = DELAY_NOMINAL_PS + DELAY_STEP_PS * h, with h a 4-bit
// value taken from a 32-bit integer hash (a "lowbias32" style mixer) of
// the seed and the position. The spread is quantised to 16 levels so that
// equal delays share one module specialisation in the simulator.
package strong_puf_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Path selector for the delay model and the challenge ordering.
  typedef enum logic {PATH_UPPER = 1'b0, PATH_LOWER = 1'b1} path_e;

  // Width of one element delay value inside a stage's delay vector.
  localparam int unsigned DELAY_W          = 16;
  localparam int unsigned DELAY_NOMINAL_PS = 400;
  localparam int unsigned DELAY_STEP_PS    = 3;
  localparam int unsigned DELAY_LEVELS     = 16;

  // Integer mixer: every input bit affects every output bit.
  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Delay in ps of element `elem` of stage `stage` on path `path` of
  // response bit `bit_idx` of the device identified by `seed`.
  function automatic int unsigned element_delay_ps(input int unsigned seed,
                                                   input int unsigned bit_idx,
                                                   input path_e       path,
                                                   input int unsigned stage,
                                                   input int unsigned elem);
    logic [31:0] h;
    h = mix32(seed ^ 32'h9e3779b9);
    h = mix32(h ^ (bit_idx * 32'h85ebca6b));
    h = mix32(h ^ ((stage * 32'hc2b2ae35) + 32'(path)));
    h = mix32(h ^ (elem * 32'h27d4eb2f));
    return DELAY_NOMINAL_PS + DELAY_STEP_PS * (int'(h[31:28]) % DELAY_LEVELS);
  endfunction
endpackage
