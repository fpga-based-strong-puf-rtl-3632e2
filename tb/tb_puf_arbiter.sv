// tb_puf_arbiter: self-checking test of the cross-coupled NAND arbiter.
//
// Drives the two path outputs in both arrival orders and checks the
// latch: idle (both low) gives R = 1, the upper input first gives R = 0,
// the lower input first gives R = 1, and the later arrival never changes
// the decision until both inputs return low.
module tb_puf_arbiter;
  timeunit 1ps;
  timeprecision 1ps;

  logic q_u, q_l, r;
  int checks = 0, failures = 0;

  puf_arbiter dut (.q_u(q_u), .q_l(q_l), .r(r));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q_u = 1'b0; q_l = 1'b0;
    #100;
    for (int rep = 0; rep < 8; rep++) begin
      automatic int gap = 1 + int'($urandom_range(0, 200));
      automatic bit upper_first = (rep % 2) == 0;
      q_u = 1'b0; q_l = 1'b0;
      #100;
      check(r == 1'b1, "idle latch gives R = 1");
      if (upper_first) q_u = 1'b1; else q_l = 1'b1;
      #1;
      check(r == (upper_first ? 1'b0 : 1'b1), "first arrival decides R");
      #gap;
      if (upper_first) q_l = 1'b1; else q_u = 1'b1;
      #1;
      check(r == (upper_first ? 1'b0 : 1'b1), "second arrival does not change R");
      // the early input falling while the late one stays high hands the
      // latch over to the late input
      if (upper_first) q_u = 1'b0; else q_l = 1'b0;
      #1;
      check(r == (upper_first ? 1'b1 : 1'b0), "remaining high input sets R");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
