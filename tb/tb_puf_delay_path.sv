// tb_puf_delay_path: self-checking test of the PUF delay paths.
//
// Builds an upper and a lower path (8 stages, M = 4, so 16 challenge bits)
// and, for random challenges, measures when each path output rises after
// START. The expected time is computed here from the element delays of
// the variation model and the challenge order: upper stage i uses
// C[2i+1:2i], lower stage i uses the bits of stage 7-i.
module tb_puf_delay_path;
  timeunit 1ps;
  timeprecision 1ps;
  import strong_puf_pkg::*;

  localparam int unsigned N    = 8;
  localparam int unsigned M    = 4;
  localparam int unsigned K    = 2;
  localparam int unsigned SEED = 7;
  localparam int unsigned BITI = 3;

  logic           start, clr, q_up, q_lo;
  logic [N*K-1:0] challenge;
  int checks = 0, failures = 0;

  puf_delay_path #(.N_STAGES(N), .M(M), .K(K), .PATH(PATH_UPPER),
                   .SEED(SEED), .BIT_IDX(BITI)) dut_u (
    .start(start), .clr(clr), .challenge(challenge), .q_out(q_up));
  puf_delay_path #(.N_STAGES(N), .M(M), .K(K), .PATH(PATH_LOWER),
                   .SEED(SEED), .BIT_IDX(BITI)) dut_l (
    .start(start), .clr(clr), .challenge(challenge), .q_out(q_lo));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic int unsigned expected_delay(input path_e p,
                                                 input logic [N*K-1:0] c);
    int unsigned sum = 0;
    for (int unsigned i = 0; i < N; i++) begin
      int unsigned cs = (p == PATH_UPPER) ? i : N - 1 - i;
      int unsigned s  = int'(c[cs*K +: K]);
      sum += element_delay_ps(SEED, BITI, p, i, s);
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

  time t_up, t_lo, t0;

  always @(posedge q_up) t_up = $time;
  always @(posedge q_lo) t_lo = $time;

  initial begin
    start = 1'b0; clr = 1'b0;
    #10;
    clr = 1'b1; challenge = '0;
    #2000;
    for (int t = 0; t < 40; t++) begin
      clr = 1'b1; start = 1'b0;
      #2000;
      check(q_up == 1'b0 && q_lo == 1'b0, "path outputs low under clear");
      challenge = (t == 0) ? '0 : (t == 1) ? '1 : N*K'($urandom);
      clr = 1'b0;
      #1000;
      t0 = $time;
      start = 1'b1;
      #(N * (DELAY_NOMINAL_PS + DELAY_STEP_PS * DELAY_LEVELS) + 1000);
      check(q_up && q_lo, "both paths finished within N times the largest delay");
      check(t_up - t0 == time'(expected_delay(PATH_UPPER, challenge)),
            $sformatf("upper path delay %0t, expected %0d", t_up - t0,
                      expected_delay(PATH_UPPER, challenge)));
      check(t_lo - t0 == time'(expected_delay(PATH_LOWER, challenge)),
            $sformatf("lower path delay %0t, expected %0d", t_lo - t0,
                      expected_delay(PATH_LOWER, challenge)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
