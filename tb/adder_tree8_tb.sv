// adder_tree8_tb: checks the eight-input adder array against a plain loop sum,
// for random operands and for the all-ones corner (the sum must not overflow),
// at both widths the threshold unit uses (10-bit samples, 13-bit group sums).
module adder_tree8_tb;
  int checks = 0, failures = 0;

  logic [9:0]  a10 [8];
  logic [12:0] s10;
  logic [12:0] a13 [8];
  logic [15:0] s13;

  adder_tree8 #(.IN_W(10)) dut10 (.a(a10), .sum(s10));
  adder_tree8 #(.IN_W(13)) dut13 (.a(a13), .sum(s13));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int r10, r13;
      r10 = 0; r13 = 0;
      for (int i = 0; i < 8; i++) begin
        a10[i] = (t == 0) ? 10'h3ff : 10'($urandom);
        a13[i] = (t == 0) ? 13'h1fff : 13'($urandom);
        r10 += int'(a10[i]);
        r13 += int'(a13[i]);
      end
      #1;
      checks += 2;
      if (int'(s10) != r10) begin
        failures++;
        $display("FAIL 10-bit: got %0d want %0d", s10, r10);
      end
      if (int'(s13) != r13) begin
        failures++;
        $display("FAIL 13-bit: got %0d want %0d", s13, r13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
