// Self-checking testbench for mux2 at a width of 8 bits: random data on
// both inputs, both select values, output compared with the input chosen.
module tb_mux2;

  localparam int unsigned W = 8;

  logic [W-1:0] d0, d1, y;
  logic         sel;
  int           checks = 0;
  int           failures = 0;

  mux2 #(.W(W)) dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d0  = W'($urandom);
      d1  = W'($urandom);
      sel = 1'(i);
      #1;
      checks++;
      if (y != (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%0d d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
