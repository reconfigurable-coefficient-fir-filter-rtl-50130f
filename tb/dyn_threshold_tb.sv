// dyn_threshold_tb: feeds whole CCD lines to the dynamic-threshold unit.
//
// First line: the ramp 0..1023, 0..1023, for which the unit must give 382
// (75% of the estimated mean 511; the exact 75% of the mean is 383.625).
// Then random lines, each checked against a model that averages the 64
// samples at pixels 15, 47, ..., 2031 and forms (avg >> 1) + (avg >> 2). Also
// checked: the threshold stays constant while a line is read and changes only
// after the line's last pixel (one thr_update pulse per line), the line sum S,
// and that a line that stops before its end leaves the threshold alone.
module dyn_threshold_tb;
  import ccd_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pix_t px = '0;
  logic px_valid = 0, thr_valid, thr_update;
  logic [ADC_W-1:0] threshold;
  logic [ADC_W+5:0] line_sum;

  dyn_threshold dut (.clk, .rst_n, .px, .px_valid, .threshold, .thr_valid, .thr_update, .line_sum);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int updates = 0;
  always @(posedge clk) if (thr_update) updates++;

  logic [ADC_W-1:0] line [2048];

  // send pixels 0..last of `line`, one every 2 clocks; check the threshold holds
  task automatic send_line(input int last);
    logic [ADC_W-1:0] thr0;
    thr0 = threshold;
    for (int p = 0; p <= last; p++) begin
      @(negedge clk);
      px.data = line[p]; px.pixel = PIX_W'(p);
      px.sol = (p == 0); px.eol = (p == 2047);
      px_valid = 1;
      @(negedge clk);
      px_valid = 0;
      if (p < last) check(threshold == thr0, $sformatf("threshold changed during line at pixel %0d", p));
    end
    repeat (6) @(negedge clk);
  endtask

  function automatic void model(output int thr, output int s);
    s = 0;
    for (int p = 15; p < 2048; p += 32) s += int'(line[p]);
    thr = ((s >> 6) >> 1) + ((s >> 6) >> 2);
  endfunction

  initial begin
    int thr, s, upd0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(threshold == 0 && thr_valid == 0, "reset threshold");

    // the ramp line
    for (int p = 0; p < 2048; p++) line[p] = ADC_W'(p % 1024);
    send_line(2047);
    check(threshold == 382, $sformatf("ramp line threshold %0d, want 382", threshold));
    check(thr_valid == 1, "thr_valid after first line");
    check(line_sum == 64 * 511, $sformatf("ramp line sum %0d", line_sum));
    check(updates == 1, "one update after first line");

    // random lines of different brightness
    for (int l = 0; l < 5; l++) begin
      int base;
      base = $urandom_range(100, 900);
      for (int p = 0; p < 2048; p++) begin
        int v;
        v = base + $urandom_range(0, 120) - 60;
        line[p] = ADC_W'((v < 0) ? 0 : (v > 1023) ? 1023 : v);
      end
      upd0 = updates;
      send_line(2047);
      model(thr, s);
      check(int'(threshold) == thr, $sformatf("line %0d threshold %0d want %0d", l, threshold, thr));
      check(int'(line_sum) == s, $sformatf("line %0d sum %0d want %0d", l, line_sum, s));
      check(updates == upd0 + 1, "one update per line");
    end

    // a line cut off after pixel 1500 changes nothing, the next full line does
    begin
      logic [ADC_W-1:0] keep;
      keep = threshold;
      for (int p = 0; p < 2048; p++) line[p] = 10'd1000;
      send_line(1500);
      check(threshold == keep, "cut-off line leaves threshold");
      send_line(2047);
      check(threshold == 10'd750, $sformatf("flat 1000 line gives 750, got %0d", threshold));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
