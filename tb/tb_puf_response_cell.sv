// tb_puf_response_cell: self-checking test of the 1-bit response cell.
//
// Two cells are tested: 16 stages with M = 2 (the measured configuration,
// shortened) and 8 stages with M = 4. For random challenges each cell is
// cleared and started; the arrival times of Q^U and Q^L and the response
// bit are compared with values computed here from the element delays of
// the variation model, the challenge order (lower path reversed) and the
// arbiter rule R = 0 when the upper path is faster. Both outcomes must
// occur at least once.
module tb_puf_response_cell;
  timeunit 1ps;
  timeprecision 1ps;
  import strong_puf_pkg::*;

  localparam int unsigned NA = 16, MA = 2, KA = 1;
  localparam int unsigned NB = 8,  MB = 4, KB = 2;
  localparam int unsigned SEED = 11;

  logic             start, clr;
  logic [NA*KA-1:0] ch_a;
  logic [NB*KB-1:0] ch_b;
  logic             r_a, qu_a, ql_a, r_b, qu_b, ql_b;
  int checks = 0, failures = 0;
  int upper_wins = 0, lower_wins = 0;

  puf_response_cell #(.N_STAGES(NA), .M(MA), .K(KA), .SEED(SEED), .BIT_IDX(5)) dut_a (
    .start(start), .clr(clr), .challenge(ch_a), .r(r_a), .q_u(qu_a), .q_l(ql_a));
  puf_response_cell #(.N_STAGES(NB), .M(MB), .K(KB), .SEED(SEED), .BIT_IDX(9)) dut_b (
    .start(start), .clr(clr), .challenge(ch_b), .r(r_b), .q_u(qu_b), .q_l(ql_b));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Delay of one path for challenge c packed as n stages of k bits.
  function automatic int unsigned path_delay(input int unsigned bit_idx,
                                             input path_e p,
                                             input int unsigned n,
                                             input int unsigned k,
                                             input logic [63:0] c);
    int unsigned sum = 0;
    for (int unsigned i = 0; i < n; i++) begin
      int unsigned cs = (p == PATH_UPPER) ? i : n - 1 - i;
      int unsigned s  = int'((c >> (cs * k)) & ((64'd1 << k) - 1));
      sum += element_delay_ps(SEED, bit_idx, p, i, s);
    end
    return sum;
  endfunction

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  time t0, tu_a, tl_a, tu_b, tl_b;
  always @(posedge qu_a) tu_a = $time;
  always @(posedge ql_a) tl_a = $time;
  always @(posedge qu_b) tu_b = $time;
  always @(posedge ql_b) tl_b = $time;

  task automatic judge(input string name, input logic r, input time tu, input time tl,
                       input int unsigned du, input int unsigned dl);
    check(tu - t0 == time'(du), $sformatf("%s upper delay %0t expected %0d", name, tu - t0, du));
    check(tl - t0 == time'(dl), $sformatf("%s lower delay %0t expected %0d", name, tl - t0, dl));
    if (du != dl) begin
      check(r == ((du < dl) ? 1'b0 : 1'b1),
            $sformatf("%s response %0b, upper %0d ps lower %0d ps", name, r, du, dl));
      if (du < dl) upper_wins++; else lower_wins++;
    end
  endtask

  initial begin
    start = 1'b0; clr = 1'b0;
    #10;
    clr = 1'b1; ch_a = '0; ch_b = '0;
    #2000;
    for (int t = 0; t < 60; t++) begin
      clr = 1'b1; start = 1'b0;
      #2000;
      check(r_a == 1'b1 && r_b == 1'b1, "cleared arbiter idles at R = 1");
      ch_a = NA*KA'($urandom);
      ch_b = NB*KB'($urandom);
      clr = 1'b0;
      #1000;
      t0 = $time;
      start = 1'b1;
      #(NA * (DELAY_NOMINAL_PS + DELAY_STEP_PS * DELAY_LEVELS) + 1000);
      judge("cell A", r_a, tu_a, tl_a,
            path_delay(5, PATH_UPPER, NA, KA, 64'(ch_a)),
            path_delay(5, PATH_LOWER, NA, KA, 64'(ch_a)));
      judge("cell B", r_b, tu_b, tl_b,
            path_delay(9, PATH_UPPER, NB, KB, 64'(ch_b)),
            path_delay(9, PATH_LOWER, NB, KB, 64'(ch_b)));
    end
    checks++;
    if (upper_wins == 0 || lower_wins == 0) begin
      failures++;
      $display("FAIL: both race outcomes must occur (upper %0d, lower %0d)",
               upper_wins, lower_wins);
    end
    $display("upper path won %0d races, lower path won %0d", upper_wins, lower_wins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
