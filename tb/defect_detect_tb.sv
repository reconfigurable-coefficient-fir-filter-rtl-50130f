// defect_detect_tb: drives lines with random dark runs through the defect
// detector and compares the written record stream, word by word, with a model
// of the record format: FFFF at each line start, 8000|pixel per defect pixel,
// {0, line number} after each run. Lines start and end with defects in some
// cases, so the two-record cases (line flag + defect, defect + run end) are
// exercised; the defect pulse count and the line counter are checked too.
module defect_detect_tb;
  import ccd_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pix_t px = '0;
  logic px_valid = 0, wr_en, defect;
  logic [ADC_W-1:0] threshold = '0;
  logic [WORD_W-1:0] wr_data;
  logic [WORD_W-2:0] line_no;

  defect_detect dut (.clk, .rst_n, .px, .px_valid, .threshold, .wr_en, .wr_data, .defect, .line_no);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WORD_W-1:0] expq[$];
  int got = 0, defects = 0, exp_defects = 0, two_rec_sol = 0, two_rec_eol = 0;

  always @(negedge clk) if (rst_n) begin
    if (wr_en) begin
      got++;
      if (expq.size() == 0) check(0, $sformatf("unexpected record %h", wr_data));
      else begin
        logic [WORD_W-1:0] e;
        e = expq.pop_front();
        check(wr_data == e, $sformatf("record %h want %h", wr_data, e));
      end
    end
    if (defect) defects++;
  end

  localparam int LEN = 100;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < 40; l++) begin
      bit dark [LEN];
      bit run;
      int gap;
      threshold = ADC_W'($urandom_range(200, 800));
      // random runs of dark pixels; some lines dark at pixel 0 and/or at the end
      foreach (dark[p]) dark[p] = 0;
      for (int r = 0; r < 4; r++) begin
        int st, ln;
        st = $urandom_range(0, LEN - 1);
        ln = $urandom_range(1, 12);
        for (int p = st; p < st + ln && p < LEN; p++) dark[p] = 1;
      end
      if (l % 5 == 1) dark[0] = 1;
      if (l % 5 == 2) dark[LEN-1] = 1;
      // model
      expq.push_back(16'hFFFF);
      run = 0;
      for (int p = 0; p < LEN; p++) begin
        if (dark[p]) begin
          expq.push_back(16'h8000 | 16'(p));
          exp_defects++;
          if (p == 0) two_rec_sol++;
          if (p == LEN - 1) begin
            expq.push_back({1'b0, 15'(l)});
            two_rec_eol++;
          end
        end else if (run) expq.push_back({1'b0, 15'(l)});
        run = dark[p];
      end
      // stimulus, one sample every 2..3 clocks
      for (int p = 0; p < LEN; p++) begin
        @(negedge clk);
        px.pixel = PIX_W'(p); px.sol = (p == 0); px.eol = (p == LEN - 1);
        px.data = dark[p] ? ADC_W'($urandom_range(0, int'(threshold) - 1))
                          : ADC_W'($urandom_range(int'(threshold), 1023));
        px_valid = 1;
        @(negedge clk);
        px_valid = 0;
        gap = $urandom_range(0, 1);
        repeat (gap) @(negedge clk);
      end
      repeat (3) @(negedge clk);
      check(line_no == 15'(l + 1), "line counter");
    end
    repeat (5) @(negedge clk);
    check(expq.size() == 0, $sformatf("%0d records missing", expq.size()));
    check(defects == exp_defects, $sformatf("defect pulses %0d want %0d", defects, exp_defects));
    check(two_rec_sol > 0 && two_rec_eol > 0, "two-record cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
