// fir_kaiser_workload_tb: the two low-pass filtering experiments of the filter
// system and a band-pass check, run through the whole front end at its
// default size.
//
// Filter: 33 taps (32nd order), Kaiser window with beta = 3.4, sampling rate
// 187.5 kHz, cut-off 35 kHz. The testbench designs it the way the host computer
// would: h(n) = (2 fc/fs) sinc(2 fc/fs (n - 16)) w(n), w the Kaiser window
// I0(beta sqrt(1 - ((n-16)/16)^2)) / I0(beta), scaled to unity DC gain and
// rounded to Q1.14; it then downloads h(0)..h(16) over the coefficient port.
// Only the ratios of the frequencies to the sampling rate matter, so the
// converter model serves one 2048-sample line per experiment, sample n being
// 512 + 200 sin(2 pi 1.5k n/fs) + 200 sin(2 pi f2 n/fs), rounded:
//
//   experiment 1: f2 = 10 kHz, both tones pass: output = input delayed by 16
//                 samples, within 4% of one tone's amplitude;
//   experiment 2: f2 = 50 kHz, above the cut-off: output = the 1.5 kHz tone
//                 alone, delayed by 16 samples; the 50 kHz tone must be at
//                 least 26 dB down (residual below 5% of its amplitude).
//
//   band-pass:    pass band 20..50 kHz (this testbench's choice of band),
//                 1.5 kHz + 35 kHz input: output = the 35 kHz tone alone
//                 (compared on the signed full-precision output, since the
//                 band-pass removes the 512 offset), within 12 LSB.
//
// Every filtered sample is also compared bit for bit with an integer
// convolution using the downloaded coefficients. The first 40 samples of each
// line (filter transient) are left out of the waveform checks.
module fir_kaiser_workload_tb;
  import ccd_pkg::*;
  int checks = 0, failures = 0;

  localparam int LEN = 2048, NT = 33, NC = 17, ACC_W = 10 + 2 + 16 + 5;
  localparam real PI = 3.14159265358979;
  localparam real FS = 187.5e3, FC = 35.0e3, BETA = 3.4;

  logic clk = 0, rst_n = 0;
  always #62.5 clk = ~clk;

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // converter model: sample n of the line after each line start
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

  // ------------------------------------------------------------ filter design
  function automatic real i0(input real x);
    real s = 1.0, t = 1.0;
    for (int k = 1; k < 30; k++) begin
      t = t * (x / (2.0 * k)) * (x / (2.0 * k));
      s += t;
    end
    return s;
  endfunction

  int h [NC];
  // band-pass variant: difference of two windowed low-pass prototypes, scaled
  // to unity gain at the band centre fm
  function automatic void design_bandpass(input real f1, input real f2, input real fm);
    real hr [NT];
    real g = 0.0, w1 = 2.0 * f1 / FS, w2 = 2.0 * f2 / FS;
    for (int n = 0; n < NT; n++) begin
      real m = n - (NT - 1) / 2.0, r = m / ((NT - 1) / 2.0), s1, s2;
      s1 = (m == 0.0) ? 1.0 : $sin(PI * w1 * m) / (PI * w1 * m);
      s2 = (m == 0.0) ? 1.0 : $sin(PI * w2 * m) / (PI * w2 * m);
      hr[n] = (w2 * s2 - w1 * s1) * i0(BETA * $sqrt(1.0 - r * r)) / i0(BETA);
      g += hr[n] * $cos(2.0 * PI * fm / FS * m);
    end
    for (int k = 0; k < NC; k++) h[k] = $rtoi(hr[k] / g * 16384.0 + ((hr[k] < 0) ? -0.5 : 0.5));
  endfunction

  function automatic void design_filter();
    real hr [NT];
    real sum = 0.0, wc = 2.0 * FC / FS;
    for (int n = 0; n < NT; n++) begin
      real m = n - (NT - 1) / 2.0, r = m / ((NT - 1) / 2.0), sinc;
      sinc = (m == 0.0) ? 1.0 : $sin(PI * wc * m) / (PI * wc * m);
      hr[n] = wc * sinc * i0(BETA * $sqrt(1.0 - r * r)) / i0(BETA);
      sum += hr[n];
    end
    for (int k = 0; k < NC; k++) h[k] = int'($rtoi(hr[k] / sum * 16384.0 + 0.5));
  endfunction

  // ------------------------------------------------------------ checking
  real tone1 [LEN], tone2 [LEN];
  int  hist [$];
  int  exp_pix = 0, nout = 0;
  real max_err = 0.0;
  bit  want_both, want_dc1 = 1;

  always @(negedge clk) if (rst_n && filt_valid) begin
    longint acc, r;
    int p, ey;
    real ideal, err;
    p = exp_pix;
    exp_pix = (exp_pix + 1) % LEN;
    hist.push_front(prof[p]);
    if (hist.size() > NT) void'(hist.pop_back());
    acc = 0;
    for (int k = 0; k < hist.size(); k++)
      acc += longint'(h[(k < NC) ? k : NT - 1 - k]) * longint'(hist[k]);
    r = (acc + 8192) >>> 14;
    ey = (r < 0) ? 0 : (r > 1023) ? 1023 : int'(r);
    check(longint'(filt_full) == acc && int'(filt_px.data) == ey && int'(filt_px.pixel) == p,
          $sformatf("pixel %0d: y %0d want %0d", p, filt_px.data, ey));
    nout++;
    if (p >= 40) begin
      ideal = want_dc1 ? 512.0 + tone1[p - 16] + (want_both ? tone2[p - 16] : 0.0)
                       : tone2[p - 16];
      err = real'(filt_full) / 16384.0 - ideal;
      if (err < 0) err = -err;
      if (err > max_err) max_err = err;
    end
  end

  task automatic cfg_write(input int a, input int d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 6'(a); cfg_wdata = 16'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic experiment(input real f2, input bit pass2);
    for (int n = 0; n < LEN; n++) begin
      tone1[n] = 200.0 * $sin(2.0 * PI * 1.5e3 * n / FS);
      tone2[n] = 200.0 * $sin(2.0 * PI * f2 * n / FS);
      prof[n] = $rtoi(512.0 + tone1[n] + tone2[n] + 0.5);
    end
    want_both = pass2;
    max_err = 0.0;
    @(negedge clk) sh_trig = 1;
    repeat (4) @(negedge clk);
    sh_trig = 0;
    wait (line_busy);
    wait (!line_busy);
    repeat (20) @(negedge clk);
  endtask

  initial begin
    int dc;
    design_filter();
    dc = 0;
    for (int k = 0; k < NT; k++) dc += h[(k < NC) ? k : NT - 1 - k];
    $display("Kaiser coefficients h(0..16):");
    for (int k = 0; k < NC; k++) $write(" %0d", h[k]);
    $display("  (DC gain %0d/16384)", dc);
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NC; k++) cfg_write(k, h[k]);
    cfg_write(63, 0);

    experiment(10.0e3, 1);
    $display("experiment 1 (1.5 kHz + 10 kHz): largest deviation from delayed input %.2f", max_err);
    check(max_err < 8.0, "experiment 1: both tones pass unchanged");
    experiment(50.0e3, 0);
    $display("experiment 2 (1.5 kHz + 50 kHz): largest deviation from delayed 1.5 kHz tone %.2f", max_err);
    check(max_err < 10.0, "experiment 2: 50 kHz tone removed, 1.5 kHz kept");

    // band-pass check: 20..50 kHz pass band, same window and length
    design_bandpass(20.0e3, 50.0e3, 35.0e3);
    for (int k = 0; k < NC; k++) cfg_write(k, h[k]);
    want_dc1 = 0;
    experiment(35.0e3, 1);
    $display("band-pass (1.5 kHz + 35 kHz, 20..50 kHz band): largest deviation from delayed 35 kHz tone %.2f", max_err);
    check(max_err < 12.0, "band-pass: 35 kHz kept, DC and 1.5 kHz removed");
    check(nout == 3 * LEN, "all samples filtered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
