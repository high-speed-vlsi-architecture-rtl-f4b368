// Self-checking testbench for dlatch_group.
//
// Instances: the default 4-bit group and the 2-, 3- and 5-bit groups of the
// 16-bit slice, all sharing one enable. For every operand pair (exhaustive
// for widths up to 4, random for 5) one enable period is run: en high for
// 2 time units, then low for 8. In the high phase, with c_in = 1, the
// output must already be a + b + 1. In the low phase both results must be
// available within that same period: c_in = 0 must give a + b (live adder)
// and c_in = 1 must give a + b + 1 (latched), the operands untouched. The
// counts of each selection are reported.
module tb_dlatch_group;

  logic       en;
  logic       c_in;
  logic [3:0] a4, b4, s4;
  logic [1:0] a2, b2, s2;
  logic [2:0] a3, b3, s3;
  logic [4:0] a5, b5, s5;
  logic       co4, co2, co3, co5;
  int         checks = 0;
  int         failures = 0;
  int         sel_latched = 0;
  int         sel_live = 0;

  dlatch_group          dut4 (.a(a4), .b(b4), .en(en), .c_in(c_in), .sum(s4), .cout(co4));
  dlatch_group #(.N(2)) dut2 (.a(a2), .b(b2), .en(en), .c_in(c_in), .sum(s2), .cout(co2));
  dlatch_group #(.N(3)) dut3 (.a(a3), .b(b3), .en(en), .c_in(c_in), .sum(s3), .cout(co3));
  dlatch_group #(.N(5)) dut5 (.a(a5), .b(b5), .en(en), .c_in(c_in), .sum(s5), .cout(co5));

  task automatic check_all(input int ci, input string phase);
    checks++;
    if ({co4, s4} != 5'(int'(a4) + int'(b4) + ci)) begin
      failures++;
      $display("FAIL N=4 %s %0d+%0d+%0d got %0d", phase, a4, b4, ci, {co4, s4});
    end
    checks++;
    if ({co2, s2} != 3'(int'(a2) + int'(b2) + ci)) begin
      failures++;
      $display("FAIL N=2 %s %0d+%0d+%0d got %0d", phase, a2, b2, ci, {co2, s2});
    end
    checks++;
    if ({co3, s3} != 4'(int'(a3) + int'(b3) + ci)) begin
      failures++;
      $display("FAIL N=3 %s %0d+%0d+%0d got %0d", phase, a3, b3, ci, {co3, s3});
    end
    checks++;
    if ({co5, s5} != 6'(int'(a5) + int'(b5) + ci)) begin
      failures++;
      $display("FAIL N=5 %s %0d+%0d+%0d got %0d", phase, a5, b5, ci, {co5, s5});
    end
  endtask

  // One enable period for the operands now applied.
  task automatic one_period();
    c_in = 1'b1;
    en   = 1'b1;
    #1;
    check_all(1, "en=1");
    #1;
    en = 1'b0;
    #2;
    // Latched path first, then the live path, then latched again: the
    // latches must not lose their value while the adder shows a + b + 0.
    c_in = 1'b1;
    #1;
    check_all(1, "latched");
    sel_latched++;
    c_in = 1'b0;
    #2;
    check_all(0, "live");
    sel_live++;
    c_in = 1'b1;
    #2;
    check_all(1, "latched again");
    sel_latched++;
    #1;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en   = 1'b0;
    c_in = 1'b0;
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x);  b4 = 4'(y);
        a2 = 2'(x);  b2 = 2'(y);
        a3 = 3'(x ^ (y >> 1)); b3 = 3'(y + x);
        a5 = 5'($urandom); b5 = 5'($urandom);
        one_period();
      end
    end
    $display("selections: latched (carry-in 1) %0d, live (carry-in 0) %0d",
             sel_latched, sel_live);
    if (sel_latched == 0 || sel_live == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
