// ccd_fir_top_tb: end-to-end run of the CCD inspection front end at its default
// size (2048-pixel lines, 33-tap filter, 4096-word defect FIFO, 8 MHz clock,
// 4 MHz sampling).
//
// A converter model serves a line profile, one value per converter clock, from
// each line start. The testbench keeps its own model of the whole chain, fed only
// with the profiles and the coefficients it downloads: the symmetric FIR
// filter (integer convolution over the profiles in the order they were
// served, rounding, clipping), the 64-sample threshold of
// the previous line, the defect record stream and a 4096-word FIFO that drops
// records when full. It checks every
// filtered sample and tag, one filtered sample every 2 clocks, every record read
// from the FIFO, the threshold after every line, the dropped-record count and
// the overflow flag.
//
// Sequence: coefficient download (and one write to an unmapped address), bright
// lines with dark runs (read back after each line), an SH pulse during a line,
// then without reading: an odd-symmetry line, a bright even-symmetry line and a
// dark line, which overflow the FIFO; then the FIFO is drained. Each mechanism
// is counted and must occur at least once.
module ccd_fir_top_tb;
  import ccd_pkg::*;
  int checks = 0, failures = 0;

  localparam int LEN = 2048, NT = 33, NC = 17, DEPTH = 4096;
  localparam int ACC_W = 10 + 2 + 16 + 5;

  logic clk = 0, rst_n = 0;
  always #62.5 clk = ~clk;   // 8 MHz

  logic sh_trig = 0, adc_clk, adc_stby, adc_3state;
  logic [ADC_W-1:0] adc_data = '0;
  logic cfg_we = 0, cfg_bad_addr;
  logic [5:0] cfg_addr = '0;
  logic [15:0] cfg_wdata = '0;
  logic filt_valid;
  pix_t filt_px;
  logic signed [ACC_W-1:0] filt_full;
  logic fifo_rd_en = 0, fifo_rd_valid, fifo_empty, fifo_full, fifo_dropped, fifo_overflow;
  logic [15:0] fifo_rd_data;
  logic [12:0] fifo_count;
  logic line_busy, line_start, trig_ignored, thr_valid, thr_update, defect;
  logic [ADC_W-1:0] threshold;
  logic [ADC_W+5:0] line_sum;
  logic [14:0] line_no;

  ccd_fir_top dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 25) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ converter model
  int prof [LEN];
  int j = 0;
  always @(negedge clk) if (line_start) begin
    j = 0;
    adc_data = ADC_W'(prof[0]);
  end
  always @(posedge adc_clk) #1 begin
    j++;
    adc_data = ADC_W'(prof[(j < LEN) ? j : LEN - 1]);
  end

  // ------------------------------------------------------------ reference model
  int  hm [NC];           // downloaded coefficients
  bit  odd_m = 0;
  int  hist [$];          // converter samples, newest first, across lines
  int  thr_m = 0, lines_m = 0, sum_m = 0;
  bit  run_m = 0;
  typedef struct { longint full; int y; int pixel; bit sol, eol; } fexp_t;
  int  fifo_m [$];
  int  drops_m = 0;

  function automatic longint hfull(input int k);
    if (k < NC - 1) return hm[k];
    if (k == NC - 1) return odd_m ? 0 : hm[k];
    return odd_m ? -longint'(hm[NT-1-k]) : longint'(hm[NT-1-k]);
  endfunction

  function automatic void push_rec(input int w);
    if (fifo_m.size() == DEPTH) drops_m++;
    else fifo_m.push_back(w);
  endfunction

  // counters of mechanisms
  int n_filt = 0, n_clip = 0, n_def = 0, n_runend = 0, n_flag = 0, n_thr = 0;
  int n_odd_lines = 0, n_dropped = 0, n_ign = 0, n_read = 0;
  int last_filt = -1, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected filtered sample for the next converter sample of the line
  int exp_pix = 0;
  function automatic fexp_t model_next();
    fexp_t e;
    longint acc, r;
    int p;
    p = exp_pix;
    exp_pix = (exp_pix + 1) % LEN;
    hist.push_front(prof[p]);
    if (hist.size() > NT) void'(hist.pop_back());
    acc = 0;
    for (int k = 0; k < hist.size(); k++) acc += hfull(k) * longint'(hist[k]);
    r = (acc + 8192) >>> 14;
    e.full = acc;
    e.y = (r < 0) ? 0 : (r > 1023) ? 1023 : int'(r);
    e.pixel = p; e.sol = (p == 0); e.eol = (p == LEN - 1);
    return e;
  endfunction

  // filtered samples: compared, then through the threshold/defect/FIFO model
  always @(negedge clk) if (rst_n && filt_valid) begin
    fexp_t e;
    n_filt++;
    if (last_filt >= 0 && filt_px.pixel != 0)
      check(cyc - last_filt == 2, $sformatf("filtered rate: %0d clocks", cyc - last_filt));
    last_filt = cyc;
    begin
      bit d;
      e = model_next();
      check(longint'(filt_full) == e.full, $sformatf("full %0d want %0d at %0d", filt_full, e.full, e.pixel));
      check(int'(filt_px.data) == e.y, $sformatf("y %0d want %0d at %0d", filt_px.data, e.y, e.pixel));
      check(int'(filt_px.pixel) == e.pixel && filt_px.sol == e.sol && filt_px.eol == e.eol, "tag");
      if (e.full > 1023 * 16384 + 8191 || e.full < -8192) n_clip++;
      // detector model
      d = e.y < thr_m;
      if (e.sol) begin push_rec(16'hFFFF); n_flag++; end
      if (d) begin push_rec(16'h8000 | e.pixel); n_def++; end
      else if (run_m && !e.sol) begin push_rec(lines_m); n_runend++; end
      if (d && e.eol) begin push_rec(lines_m); n_runend++; end
      run_m = d && !e.eol;
      // threshold model
      if (e.sol) sum_m = 0;
      if (e.pixel % 32 == 15) sum_m += e.y;
      if (e.eol) begin
        thr_m = ((sum_m >> 6) >> 1) + ((sum_m >> 6) >> 2);
        lines_m++;
        if (odd_m) n_odd_lines++;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (fifo_dropped) n_dropped++;
    if (trig_ignored) n_ign++;
    if (thr_update) n_thr++;
  end

  // ------------------------------------------------------------ host side
  task automatic cfg_write(input int a, input int d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 6'(a); cfg_wdata = 16'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic run_line(input bit extra_trigger);
    @(negedge clk) sh_trig = 1;
    repeat (4) @(negedge clk);
    sh_trig = 0;
    wait (line_busy);
    if (extra_trigger) begin
      repeat (300) @(negedge clk);
      sh_trig = 1;
      repeat (4) @(negedge clk);
      sh_trig = 0;
    end
    wait (!line_busy);
    repeat (20) @(negedge clk);
    check(int'(threshold) == thr_m, $sformatf("threshold %0d want %0d after line %0d", threshold, thr_m, lines_m));
    check(int'(line_no) == lines_m, "line number");
  endtask

  task automatic drain();
    while (!fifo_empty) begin
      @(negedge clk) fifo_rd_en = 1;
      @(negedge clk) fifo_rd_en = 0;
      check(fifo_rd_valid, "read valid");
      n_read++;
      if (fifo_m.size() == 0) check(0, $sformatf("extra record %h", fifo_rd_data));
      else begin
        int w = fifo_m.pop_front();
        check(int'(fifo_rd_data) == w, $sformatf("record %h want %h", fifo_rd_data, w));
      end
    end
    check(fifo_m.size() == 0, $sformatf("%0d records missing", fifo_m.size()));
  endtask

  function automatic void bright_line(input int ndef);
    for (int p = 0; p < LEN; p++) prof[p] = 900 + $urandom_range(0, 80) - 40;
    for (int d = 0; d < ndef; d++) begin
      int st = $urandom_range(40, LEN - 100), w = $urandom_range(30, 60);
      for (int p = st; p < st + w; p++) prof[p] = $urandom_range(0, 60);
    end
  endfunction

  initial begin
    int w [NC];
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    check(adc_stby == 0 && adc_3state == 0, "converter control pins");

    // low-pass, triangular taps with DC gain about 1.06 (so bright pixels clip)
    for (int k = 0; k < NC; k++) begin
      hm[k] = (k + 1) * 17408 / 289;
      cfg_write(k, hm[k]);
    end
    cfg_write(63, 0);
    @(negedge clk) cfg_we = 1; cfg_addr = 6'd20; cfg_wdata = 16'h7777;
    @(posedge clk) #1 check(cfg_bad_addr, "unmapped coefficient address flagged");
    @(negedge clk) cfg_we = 0;

    // bright lines with dark runs, read back after each
    for (int l = 0; l < 4; l++) begin
      bright_line(l == 0 ? 0 : 3);
      run_line(l == 2);
      drain();
    end
    // no reading: odd-symmetry line, bright line, dark line -> FIFO overflows
    odd_m = 1; cfg_write(63, 1);
    bright_line(2);
    run_line(0);
    odd_m = 0; cfg_write(63, 0);
    bright_line(0);
    run_line(0);
    for (int p = 0; p < LEN; p++) prof[p] = 20 + $urandom_range(0, 10);
    run_line(0);
    bright_line(0);
    run_line(0);
    for (int p = 0; p < LEN; p++) prof[p] = 20 + $urandom_range(0, 10);
    run_line(0);
    check(fifo_overflow, "FIFO overflow flag");
    check(n_dropped == drops_m, $sformatf("dropped %0d want %0d", n_dropped, drops_m));
    drain();

    $display("filtered %0d clipped %0d defect-pixels %0d run-ends %0d line-flags %0d",
             n_filt, n_clip, n_def, n_runend, n_flag);
    $display("threshold-updates %0d odd-lines %0d dropped %0d ignored-SH %0d records-read %0d",
             n_thr, n_odd_lines, n_dropped, n_ign, n_read);
    check(n_filt == 9 * LEN, "all samples filtered");
    check(n_clip > 0, "filter output clipping happened");
    check(n_def > 0 && n_runend > 0 && n_flag == 9, "defect records, run ends, line flags");
    check(n_thr == 9, "threshold updated after every line");
    check(n_odd_lines == 1, "odd-symmetry line run");
    check(n_dropped > 0, "FIFO overflow happened");
    check(n_ign == 1, "SH during a line ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
