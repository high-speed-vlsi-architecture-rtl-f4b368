// Self-checking testbench for csla16_dlatch.
//
// Each addition runs in one enable period: operands and carry-in applied
// while en is low, en high for 2 time units, low for 8, result checked at
// the end of that low phase (one addition per period). Operands are random,
// plus patterns that make the carry run the whole width (a = ~b with
// cin = 1, all ones). The reference is integer addition. For every upper
// group the carry into it is taken from the reference (carry into bit p =
// a[p] ^ b[p] ^ sum[p]) and the number of times the latched (carry-in 1)
// and live (carry-in 0) results were selected is counted; each must occur.
module tb_csla16_dlatch;

  localparam int unsigned NOPS = 20000;

  logic [15:0] a, b, sum;
  logic        cin, cout, en;
  int          checks = 0;
  int          failures = 0;
  int          sel_latched [1:4];
  int          sel_live    [1:4];
  int          carry_out_seen = 0;
  int          full_ripple = 0;
  // Least significant bit of groups 1..4: widths 2, 2, 3, 4, 5.
  int          grp_lsb [1:4] = '{2, 4, 7, 11};

  csla16_dlatch dut (.a(a), .b(b), .cin(cin), .en(en), .sum(sum), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] expected;
    logic [15:0] carries;
    en = 1'b0;
    for (int g = 1; g <= 4; g++) begin
      sel_latched[g] = 0;
      sel_live[g]    = 0;
    end
    for (int unsigned i = 0; i < NOPS; i++) begin
      case (i % 4)
        0: begin a = 16'($urandom); b = 16'($urandom); end
        1: begin a = 16'($urandom); b = ~a; end
        2: begin a = 16'hFFFF; b = 16'($urandom) & 16'h0001; end
        default: begin a = 16'($urandom); b = 16'($urandom) | a; end
      endcase
      cin = 1'($urandom);
      #1;
      en = 1'b1;
      #2;
      en = 1'b0;
      #7;
      expected = 17'(a) + 17'(b) + 17'(cin);
      checks++;
      if ({cout, sum} != expected) begin
        failures++;
        if (failures < 10)
          $display("FAIL %h + %h + %0d: got %0d_%h want %h", a, b, cin, cout, sum, expected);
      end
      carries = a ^ b ^ expected[15:0];
      for (int g = 1; g <= 4; g++) begin
        if (carries[grp_lsb[g]]) sel_latched[g]++;
        else                     sel_live[g]++;
      end
      if (expected[16]) carry_out_seen++;
      if (cin && (a ^ b) == 16'hFFFF) full_ripple++;
    end
    for (int g = 1; g <= 4; g++) begin
      $display("group %0d: latched %0d live %0d", g, sel_latched[g], sel_live[g]);
      if (sel_latched[g] == 0 || sel_live[g] == 0) failures++;
    end
    $display("carry out %0d times, carry across all 16 bits %0d times",
             carry_out_seen, full_ripple);
    if (carry_out_seen == 0 || full_ripple == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
