// End-to-end testbench for csla1024_dlatch at its default width (1024 bits,
// 64 slices of 16 bits, 320 carry select groups).
//
// Each addition runs in one enable period: operands applied while en is
// low, en high for 2 time units (every group latches its carry-in-1
// result), low for 8, and {cout, sum} checked at the end of that low phase
// against a 1025-bit integer sum. Operand patterns: random words, a = ~b
// (the carry, when cin = 1, must cross all 1024 bits), all ones plus one,
// and random words with long runs of propagate bits. Mechanisms counted and
// required: latched (carry-in 1) and live (carry-in 0) selection in every
// group position of a slice, a carry crossing from one slice to the next,
// a carry across the whole adder, and the final carry-out.
module tb_csla1024_dlatch;

  localparam int unsigned W    = 1024;
  localparam int unsigned NOPS = 400;

  logic [W-1:0] a, b, sum;
  logic         cin, cout, en;
  int           checks = 0;
  int           failures = 0;
  int           sel_latched [1:4];
  int           sel_live    [1:4];
  int           slice_carry = 0;
  int           carry_out_seen = 0;
  int           full_ripple = 0;
  int           grp_lsb [1:4] = '{2, 4, 7, 11};

  csla1024_dlatch dut (.a(a), .b(b), .cin(cin), .en(en), .sum(sum), .cout(cout));

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] r;
    for (int unsigned k = 0; k < W / 32; k++) r[k*32 +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0]   expected;
    logic [W-1:0] carries;
    en = 1'b0;
    for (int g = 1; g <= 4; g++) begin
      sel_latched[g] = 0;
      sel_live[g]    = 0;
    end
    for (int unsigned i = 0; i < NOPS; i++) begin
      case (i % 4)
        0: begin a = rand_word(); b = rand_word(); cin = 1'($urandom); end
        1: begin a = rand_word(); b = ~a; cin = 1'b1; end
        2: begin a = '1; b = W'(i & 1); cin = 1'(~i[0]); end
        default: begin
          a = rand_word();
          b = ~a & rand_word() & rand_word() & rand_word();  // sparse generates
          b = b | (~a & rand_word());
          cin = 1'($urandom);
        end
      endcase
      #1;
      en = 1'b1;
      #2;
      en = 1'b0;
      #7;
      expected = (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
      checks++;
      if ({cout, sum} != expected) begin
        failures++;
        if (failures < 5)
          $display("FAIL op %0d: cout %0d want %0d, sum mismatch bits %0d",
                   i, cout, expected[W], $countones(sum ^ expected[W-1:0]));
      end
      carries = a ^ b ^ expected[W-1:0];
      for (int unsigned k = 0; k < W / 16; k++) begin
        for (int g = 1; g <= 4; g++) begin
          if (carries[k*16 + grp_lsb[g]]) sel_latched[g]++;
          else                            sel_live[g]++;
        end
        if (k > 0 && carries[k*16]) slice_carry++;
      end
      if (expected[W]) carry_out_seen++;
      if (cin && (a ^ b) == '1) full_ripple++;
    end
    for (int g = 1; g <= 4; g++) begin
      $display("group %0d of each slice: latched %0d live %0d", g, sel_latched[g], sel_live[g]);
      if (sel_latched[g] == 0 || sel_live[g] == 0) failures++;
    end
    $display("carry between slices %0d, carry across all %0d bits %0d, carry out %0d",
             slice_carry, W, full_ripple, carry_out_seen);
    if (slice_carry == 0 || full_ripple == 0 || carry_out_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
