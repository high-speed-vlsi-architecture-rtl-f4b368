// Self-checking testbench for rca: the 2-bit default (the least significant
// group of the adder) exhaustively, and a 5-bit instance exhaustively, both
// compared with integer addition of a, b and cin.
module tb_rca;

  logic [1:0] a2, b2, s2;
  logic [4:0] a5, b5, s5;
  logic       cin, co2, co5;
  int         checks = 0;
  int         failures = 0;

  rca         dut2 (.a(a2), .b(b2), .cin(cin), .sum(s2), .cout(co2));
  rca #(.N(5)) dut5 (.a(a5), .b(b5), .cin(cin), .sum(s5), .cout(co5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++) begin
      for (int x = 0; x < 32; x++) begin
        for (int y = 0; y < 32; y++) begin
          cin = 1'(ci);
          a2  = 2'(x);
          b2  = 2'(y);
          a5  = 5'(x);
          b5  = 5'(y);
          #1;
          if (x < 4 && y < 4) begin
            checks++;
            if ({co2, s2} != 3'(x + y + ci)) begin
              failures++;
              $display("FAIL N=2 %0d+%0d+%0d got %0d", x, y, ci, {co2, s2});
            end
          end
          checks++;
          if ({co5, s5} != 6'(x + y + ci)) begin
            failures++;
            $display("FAIL N=5 %0d+%0d+%0d got %0d", x, y, ci, {co5, s5});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
