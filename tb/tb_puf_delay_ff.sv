// tb_puf_delay_ff: self-checking test of one PUF delay element.
//
// Checks the asynchronous clear, that a rising clock edge makes q rise
// exactly DELAY_PS later (not earlier, not later), that a falling edge
// changes nothing, that d = 0 keeps q low, and that a clear pulse during
// a high q brings it back low.
module tb_puf_delay_ff;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DLY = 123;

  logic clk, clr, d, q;
  int checks = 0, failures = 0;

  puf_delay_ff #(.DELAY_PS(DLY)) dut (.clk(clk), .clr(clr), .d(d), .q(q));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0; clr = 1'b0; d = 1'b1;
    #10;
    clr = 1'b1;
    #1000;
    check(q == 1'b0, "q low under clear");
    clr = 1'b0;
    #1000;
    check(q == 1'b0, "q low after clear released");
    // launch edge: q must rise exactly DLY later
    clk = 1'b1;
    #(DLY - 1);
    check(q == 1'b0, "q still low 1 ps before the element delay");
    #1;
    check(q == 1'b1, "q high exactly at the element delay");
    #500;
    clk = 1'b0;
    #1000;
    check(q == 1'b1, "falling clock edge leaves q high");
    // second rising edge keeps q high
    clk = 1'b1; #1000; clk = 1'b0;
    check(q == 1'b1, "second rising edge keeps q high");
    // clear pulse
    clr = 1'b1;
    #(DLY + 1);
    check(q == 1'b0, "clear brings q low");
    clr = 1'b0;
    #1000;
    check(q == 1'b0, "q stays low after clear without a clock edge");
    // d = 0: a clock edge must not set q
    d = 1'b0;
    clk = 1'b1;
    #1000;
    check(q == 1'b0, "d = 0 keeps q low on a clock edge");
    clk = 1'b0; d = 1'b1;
    #1000;
    clk = 1'b1;
    #(DLY + 1);
    check(q == 1'b1, "d = 1 sets q again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
