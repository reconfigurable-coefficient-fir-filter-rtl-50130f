// coef_bank_tb: checks the reset contents (pass-through centre tap), register
// writes of every coefficient, the symmetry control bit, the one-cycle write
// timing and the rejection of unmapped addresses.
module coef_bank_tb;
  int checks = 0, failures = 0;
  localparam int NTAPS = 33, NC = 17;

  logic clk = 0, rst_n = 0, we = 0, bad_addr, odd_sym;
  logic [5:0] addr = '0;
  logic [15:0] wdata = '0;
  logic signed [15:0] coef [NC];
  logic signed [15:0] model [NC];

  coef_bank #(.NTAPS(NTAPS)) dut (.clk, .rst_n, .we, .addr, .wdata, .coef, .odd_sym, .bad_addr);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic compare_all(input string when);
    for (int i = 0; i < NC; i++)
      check(coef[i] == model[i], $sformatf("%s: coef[%0d]=%0d want %0d", when, i, coef[i], model[i]));
  endtask

  initial begin
    for (int i = 0; i < NC; i++) model[i] = (i == NC - 1) ? 16'sd16384 : 16'sd0;
    repeat (2) @(posedge clk);
    #1 compare_all("reset");
    check(odd_sym == 0, "reset symmetry");
    rst_n = 1;
    // write every coefficient with a random value
    for (int i = 0; i < NC; i++) begin
      @(negedge clk);
      we = 1; addr = 6'(i); wdata = 16'($urandom);
      model[i] = wdata;
      @(negedge clk);
      we = 0;
      check(coef[i] == model[i], $sformatf("write visible next cycle, coef[%0d]", i));
    end
    compare_all("after writes");
    // symmetry bit
    @(negedge clk); we = 1; addr = 6'd63; wdata = 16'h0001;
    @(negedge clk); we = 0;
    check(odd_sym == 1, "odd symmetry set");
    compare_all("after ctrl write");
    // unmapped address: nothing changes, bad_addr pulses
    @(negedge clk); we = 1; addr = 6'd40; wdata = 16'h1234;
    @(posedge clk); #1;
    check(bad_addr == 1, "bad_addr pulse");
    @(negedge clk); we = 0;
    @(posedge clk); #1;
    check(bad_addr == 0, "bad_addr one cycle");
    compare_all("after bad write");
    check(odd_sym == 1, "symmetry kept");
    @(negedge clk); we = 1; addr = 6'd63; wdata = 16'h0000;
    @(negedge clk); we = 0;
    check(odd_sym == 0, "even symmetry set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
