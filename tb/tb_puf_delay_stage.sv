// tb_puf_delay_stage: self-checking test of one PUF delay stage (M = 4).
//
// Gives the four elements distinct delays and, for every select value,
// clears the stage, raises the input edge and measures when the output
// rises: it must rise exactly after the delay of the selected element.
// Also checks that the output is low while cleared.
module tb_puf_delay_stage;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned M = 4;
  localparam int unsigned K = 2;
  localparam int unsigned DLY [M] = '{401, 437, 419, 455};
  localparam logic [M-1:0][15:0] DLY_VEC = {16'd455, 16'd419, 16'd437, 16'd401};

  logic         in_edge, clr, out_edge;
  logic [K-1:0] sel;
  int checks = 0, failures = 0;

  puf_delay_stage #(.M(M), .K(K), .DELAY_PS(DLY_VEC)) dut (
    .in_edge(in_edge), .clr(clr), .sel(sel), .out_edge(out_edge)
  );

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
    time t0, dt;
    in_edge = 1'b0; clr = 1'b0;
    #10;
    clr = 1'b1; sel = '0;
    #1000;
    for (int rep = 0; rep < 2; rep++) begin
      for (int s = 0; s < int'(M); s++) begin
        clr = 1'b1; in_edge = 1'b0;
        #1000;
        check(out_edge == 1'b0, "output low under clear");
        clr = 1'b0;
        sel = K'(s);
        #1000;
        t0 = $time;
        in_edge = 1'b1;
        @(posedge out_edge);
        dt = $time - t0;
        check(dt == time'(DLY[s]),
              $sformatf("sel=%0d delay %0t, expected %0d", s, dt, DLY[s]));
        #1000;
        check(out_edge == 1'b1, "output stays high after the race");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
