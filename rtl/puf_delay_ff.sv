// puf_delay_ff: one delay element of the Strong PUF.
//
// A D flip-flop whose D input is tied high by the enclosing stage and whose
// clock is the signal arriving from the previous stage (START for the first
// stage). A rising edge on clk therefore makes q rise; the time from that
// edge to q is the element's delay, which is what the PUF measures. CLEAR
// resets the flip-flop asynchronously (active high) so a new race can run.
// D tied to 1, the clock taken from the previous stage and the common CLEAR
// follow the flip-flop delay chain the PUF is built from; the active-high,
// asynchronous clear is this design's choice.
//
// DELAY_PS models the device-specific clock-to-output plus routing delay
// in simulation (an inertial delay on q). Synthesis ignores it: on a real
// FPGA the delay is whatever that flip-flop and its routing have.
//
// Interface: clk (launch edge), clr (async clear), d (data), q (output).
// Timing: q follows clk's rising edge by DELAY_PS; clr forces q low after
// DELAY_PS.
module puf_delay_ff #(
  parameter int unsigned DELAY_PS = strong_puf_pkg::DELAY_NOMINAL_PS
) (
  input  logic clk,
  input  logic clr,
  input  logic d,
  output logic q
);
  timeunit 1ps;
  timeprecision 1ps;

  // Kept through synthesis: every element is logically identical to its
  // neighbours, but physically it is a distinct delay and must not be
  // merged or removed.
  (* keep = "true", dont_touch = "true" *)
  logic q_state;

  (* keep = "true" *)
  always_ff @(posedge clk or posedge clr) begin
    if (clr) q_state <= 1'b0;
    else     q_state <= d;
  end

  assign #(DELAY_PS) q = q_state;
endmodule
