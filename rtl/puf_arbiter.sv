// puf_arbiter: race arbiter of a 1-bit response cell.
//
// Two cross-coupled NAND gates form an SR latch:
//   Z0 = ~(Q^U & Z1),  Z1 = ~(Q^L & Z0),  R = Z0.
// While both path outputs are low (after CLEAR) Z0 = Z1 = 1. The first
// input to rise pulls its own NAND low, which then holds the other NAND's
// output high, so the later arrival changes nothing:
//   Q^U first -> R = 0,   Q^L first -> R = 1.
// The cross-coupled NAND pair and R taken from Z0 follow the PUF design.
// Inputs that rise at the same instant are the metastable case of the real
// latch; in zero-delay simulation the outcome is decided by the
// simulator's evaluation order.
//
// The combinational loop is the latch itself and is intentional; tools
// report it as a loop.
//
// Interface: q_u, q_l (path outputs), r (response bit, Z0).
// Timing: r settles as soon as the first input rises (no gate delay is
// modelled).
module puf_arbiter (
  input  logic q_u,
  input  logic q_l,
  output logic r
);
  timeunit 1ps;
  timeprecision 1ps;

  logic z0, z1;

  assign z0 = ~(q_u & z1);
  assign z1 = ~(q_l & z0);
  assign r  = z0;
endmodule
