// Self-checking testbench for d_latch: while e = 1, q must follow d (and
// qn its complement); after e falls, q must keep the last value of d
// however d moves afterwards.
module tb_d_latch;

  logic d, e, q, qn;
  int   checks = 0;
  int   failures = 0;

  d_latch dut (.d(d), .e(e), .q(q), .qn(qn));

  task automatic expect_q(input logic want, input string what);
    checks++;
    if (q !== want || qn !== ~want) begin
      failures++;
      $display("FAIL %s: q=%0d qn=%0d want %0d", what, q, qn, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic stored;
    for (int i = 0; i < 100; i++) begin
      // Transparent phase: q follows d through a few changes.
      e = 1'b1;
      for (int j = 0; j < 3; j++) begin
        d = 1'($urandom);
        #1;
        expect_q(d, "transparent");
      end
      stored = d;
      // Hold phase: d toggles, q stays.
      e = 1'b0;
      #1;
      for (int j = 0; j < 3; j++) begin
        d = ~d;
        #1;
        expect_q(stored, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
