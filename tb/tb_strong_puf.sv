// tb_strong_puf: end-to-end test of the Strong PUF at reduced size.
//
// Five simulated devices carry the same design: four with 16-bit responses,
// 16 stages and M = 2 (seeds 1..4), and one with 8 stages and M = 4.
// For random challenges every device is cleared and started. For each
// response bit the expected value is worked out here from the element
// delays of the variation model: sum the delays the challenge selects on
// the upper path (stage i uses C[i*K +: K]) and on the lower path (stage i
// uses the bits of stage N-1-i); the faster path wins, R = 0 for upper.
// The settle time of every device (last path output to rise) is checked
// against the slowest expected path.
//
// Mechanisms that must each happen at least once: a clear, a race, an
// upper-path win, a lower-path win, every element of a stage selected,
// a bit whose value depends on the reversed challenge order of the lower
// path, and two devices answering the same challenge differently. The
// average inter-device Hamming distance (uniqueness) is printed.
module tb_strong_puf;
  timeunit 1ps;
  timeprecision 1ps;
  import strong_puf_pkg::*;

  localparam int unsigned NB   = 16;
  localparam int unsigned NS   = 16;
  localparam int unsigned ND   = 4;
  localparam int unsigned NS4  = 8;
  localparam int unsigned NB4  = 8;
  localparam int unsigned TESTS = 40;

  logic          start, clear;
  logic [NS-1:0]    ch2;
  logic [NS4*2-1:0] ch4;
  logic [NB-1:0] resp  [ND];
  logic [NB-1:0] qu    [ND];
  logic [NB-1:0] ql    [ND];
  logic [NB4-1:0] resp4, qu4, ql4;

  int checks = 0, failures = 0;
  int n_clear = 0, n_race = 0, n_upper = 0, n_lower = 0, n_reversal = 0, n_differ = 0;
  int sel_seen [4];
  real hd_sum = 0.0;
  int  hd_pairs = 0;

  for (genvar d = 0; d < int'(ND); d++) begin : g_dev
    strong_puf #(.N_BITS(NB), .N_STAGES(NS), .M(2), .DEVICE_SEED(d + 1)) dut (
      .start(start), .clear(clear), .challenge(ch2),
      .response(resp[d]), .q_upper(qu[d]), .q_lower(ql[d]));
  end

  strong_puf #(.N_BITS(NB4), .N_STAGES(NS4), .M(4), .DEVICE_SEED(77)) dut4 (
    .start(start), .clear(clear), .challenge(ch4),
    .response(resp4), .q_upper(qu4), .q_lower(ql4));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Path delay; `reversed` selects the lower path's challenge order.
  function automatic int unsigned path_delay(input int unsigned seed, input int unsigned b,
                                             input path_e p, input bit reversed,
                                             input int unsigned n, input int unsigned k,
                                             input logic [127:0] c);
    int unsigned sum = 0;
    for (int unsigned i = 0; i < n; i++) begin
      int unsigned cs = reversed ? n - 1 - i : i;
      int unsigned s  = int'((c >> (cs * k)) & ((128'd1 << k) - 1));
      sum += element_delay_ps(seed, b, p, i, s);
    end
    return sum;
  endfunction

  initial begin
    #1_000_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // time at which every path output of every device is high
  time t0, t_settle;
  logic all_done;
  always_comb begin
    all_done = &qu4 & &ql4;
    for (int d = 0; d < int'(ND); d++) all_done &= &qu[d] & &ql[d];
  end
  always @(posedge all_done) t_settle = $time;

  // Checks one device's response bits and returns the slowest path delay.
  task automatic judge(input string name, input int unsigned seed, input int unsigned nbits,
                       input int unsigned n, input int unsigned k, input logic [127:0] c,
                       input logic [63:0] r, inout int unsigned slowest);
    for (int unsigned b = 0; b < nbits; b++) begin
      int unsigned du  = path_delay(seed, b, PATH_UPPER, 1'b0, n, k, c);
      int unsigned dl  = path_delay(seed, b, PATH_LOWER, 1'b1, n, k, c);
      int unsigned dlf = path_delay(seed, b, PATH_LOWER, 1'b0, n, k, c);
      if (du > slowest) slowest = du;
      if (dl > slowest) slowest = dl;
      if (du == dl) continue;
      check(r[b] == ((du < dl) ? 1'b0 : 1'b1),
            $sformatf("%s bit %0d: R=%0b, upper %0d ps, lower %0d ps", name, b, r[b], du, dl));
      if (du < dl) n_upper++; else n_lower++;
      if (du != dlf && ((du < dl) != (du < dlf))) n_reversal++;
    end
  endtask

  initial begin
    start = 1'b0; clear = 1'b0; ch2 = '0; ch4 = '0;
    for (int s = 0; s < 4; s++) sel_seen[s] = 0;
    #10;
    for (int t = 0; t < int'(TESTS); t++) begin
      automatic int unsigned slowest = 0;
      clear = 1'b1; start = 1'b0;
      n_clear++;
      #2000;
      check(&resp[0] && &resp4, "cleared arbiters idle at R = 1");
      check(!(|qu[0]) && !(|ql[0]) && !(|qu4), "path outputs low under clear");
      ch2 = NS'($urandom);
      ch4 = {$urandom};
      for (int i = 0; i < int'(NS); i++) sel_seen[ch2[i]]++;
      for (int i = 0; i < int'(NS4); i++) sel_seen[ch4[2*i +: 2]]++;
      clear = 1'b0;
      #1000;
      t0 = $time;
      start = 1'b1;
      n_race++;
      #(NS * (DELAY_NOMINAL_PS + DELAY_STEP_PS * DELAY_LEVELS) + 1000);
      check(all_done, "every path finished within N times the largest delay");
      for (int d = 0; d < int'(ND); d++)
        judge($sformatf("device %0d", d), d + 1, NB, NS, 1, 128'(ch2), 64'(resp[d]), slowest);
      judge("M=4 device", 77, NB4, NS4, 2, 128'(ch4), 64'(resp4), slowest);
      check(t_settle - t0 == time'(slowest),
            $sformatf("settle time %0t, expected %0d", t_settle - t0, slowest));
      // inter-device Hamming distance, Eq. (2) style average
      for (int i = 0; i < int'(ND) - 1; i++)
        for (int j = i + 1; j < int'(ND); j++) begin
          automatic int hd = $countones(resp[i] ^ resp[j]);
          hd_sum += 100.0 * real'(hd) / real'(NB);
          hd_pairs++;
          if (hd != 0) n_differ++;
        end
    end
    $display("clears %0d races %0d upper wins %0d lower wins %0d reversal-dependent bits %0d differing device pairs %0d",
             n_clear, n_race, n_upper, n_lower, n_reversal, n_differ);
    $display("element selections: %0d %0d %0d %0d", sel_seen[0], sel_seen[1], sel_seen[2], sel_seen[3]);
    $display("uniqueness over %0d devices: %0.2f %%", ND, hd_sum / real'(hd_pairs));
    checks++; if (n_clear == 0)    begin failures++; $display("FAIL: no clear"); end
    checks++; if (n_race == 0)     begin failures++; $display("FAIL: no race"); end
    checks++; if (n_upper == 0)    begin failures++; $display("FAIL: upper path never won"); end
    checks++; if (n_lower == 0)    begin failures++; $display("FAIL: lower path never won"); end
    checks++; if (n_reversal == 0) begin failures++; $display("FAIL: reversed order never mattered"); end
    checks++; if (n_differ == 0)   begin failures++; $display("FAIL: devices never differed"); end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (sel_seen[s] == 0) begin failures++; $display("FAIL: element %0d never selected", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
