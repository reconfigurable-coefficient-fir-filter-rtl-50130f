// fir_filter_tb: compares the linear-phase FIR filter with a direct convolution.
//
// The reference expands the NC downloaded coefficients to all NTAPS taps using
// h(n) = +/-h(N-1-n) (odd symmetry forces the centre tap of an odd-length
// filter to zero) and convolves it with the input history, in plain integer
// arithmetic, then rounds and clips as the filter's output format says. Checked
// for every output: y, y_full, the sideband tag and the latency of exactly 4
// clocks from in_valid to out_valid. Runs random coefficients in even and odd
// mode, full-scale coefficients that clip the output, back-to-back samples and
// samples with gaps, on the default 33-tap filter (odd N) and on an 8-tap
// filter (even N).
module fir_filter_tb;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

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

  // ------------------------------------------------------------------ 33 taps
  localparam int N1 = 33, NC1 = 17, ACC1 = 10 + 2 + 16 + 5;
  logic signed [15:0] c1 [NC1];
  logic odd1 = 0, iv1 = 0, ov1;
  logic [9:0] d1 = 0, y1;
  logic [12:0] t1 = 0, ot1;
  logic signed [ACC1-1:0] yf1;
  fir_filter dut1 (.clk, .rst_n, .coef(c1), .odd_sym(odd1), .in_valid(iv1), .in_data(d1),
                   .in_tag(t1), .out_valid(ov1), .y(y1), .y_full(yf1), .out_tag(ot1));

  // ------------------------------------------------------------------ 8 taps
  localparam int N2 = 8, NC2 = 4, ACC2 = 10 + 2 + 16 + 3;
  logic signed [15:0] c2 [NC2];
  logic odd2 = 0, iv2 = 0, ov2;
  logic [9:0] d2 = 0, y2;
  logic [12:0] t2 = 0, ot2;
  logic signed [ACC2-1:0] yf2;
  fir_filter #(.NTAPS(N2)) dut2 (.clk, .rst_n, .coef(c2), .odd_sym(odd2), .in_valid(iv2), .in_data(d2),
                   .in_tag(t2), .out_valid(ov2), .y(y2), .y_full(yf2), .out_tag(ot2));

  typedef struct { longint full; int y; int tag; int cyc; } exp_t;
  exp_t q1[$], q2[$];
  int   h1[$], h2[$];   // input history, newest first

  function automatic longint tap(input int n, input int k, input int nc, input bit odd,
                                 input logic signed [15:0] c []);
    int j;
    if (k < nc && !(n % 2 == 1 && k == nc - 1)) return c[k];
    if (n % 2 == 1 && k == nc - 1) return odd ? 0 : c[k];
    j = n - 1 - k;
    return odd ? -longint'(c[j]) : longint'(c[j]);
  endfunction

  function automatic exp_t model(input int n, input int nc, input bit odd,
                                 input logic signed [15:0] c [], input int hist[$], input int tg);
    exp_t e;
    longint s = 0, r;
    for (int k = 0; k < n; k++) s += tap(n, k, nc, odd, c) * longint'(k < hist.size() ? hist[k] : 0);
    r = (s + 8192) >>> 14;
    e.full = s;
    e.y    = (r < 0) ? 0 : (r > 1023) ? 1023 : int'(r);
    e.tag  = tg;
    return e;
  endfunction

  // input side: record the expected result when a sample is accepted
  always @(posedge clk) if (rst_n) begin
    if (iv1) begin
      exp_t e;
      logic signed [15:0] cc [] = new[NC1];
      foreach (cc[i]) cc[i] = c1[i];
      h1.push_front(int'(d1));
      if (h1.size() > N1) void'(h1.pop_back());
      e = model(N1, NC1, odd1, cc, h1, int'(t1));
      e.cyc = cycle;
      q1.push_back(e);
    end
    if (iv2) begin
      exp_t e;
      logic signed [15:0] cc [] = new[NC2];
      foreach (cc[i]) cc[i] = c2[i];
      h2.push_front(int'(d2));
      if (h2.size() > N2) void'(h2.pop_back());
      e = model(N2, NC2, odd2, cc, h2, int'(t2));
      e.cyc = cycle;
      q2.push_back(e);
    end
  end

  int outs1 = 0, outs2 = 0, clipped_hi = 0, clipped_lo = 0;
  always @(negedge clk) if (rst_n) begin
    if (ov1) begin
      exp_t e;
      outs1++;
      if (q1.size() == 0) check(0, "dut1 output without input");
      else begin
        e = q1.pop_front();
        check(longint'(yf1) == e.full, $sformatf("dut1 y_full %0d want %0d", yf1, e.full));
        check(int'(y1) == e.y, $sformatf("dut1 y %0d want %0d", y1, e.y));
        check(int'(ot1) == e.tag, "dut1 tag");
        check(cycle - e.cyc == 4, $sformatf("dut1 latency %0d", cycle - e.cyc));
        if (e.y == 1023 && e.full > 1023 * 16384) clipped_hi++;
        if (e.full < -8192) clipped_lo++;
      end
    end
    if (ov2) begin
      exp_t e;
      outs2++;
      if (q2.size() == 0) check(0, "dut2 output without input");
      else begin
        e = q2.pop_front();
        check(longint'(yf2) == e.full, $sformatf("dut2 y_full %0d want %0d", yf2, e.full));
        check(int'(y2) == e.y, $sformatf("dut2 y %0d want %0d", y2, e.y));
        check(int'(ot2) == e.tag, "dut2 tag");
        check(cycle - e.cyc == 4, $sformatf("dut2 latency %0d", cycle - e.cyc));
      end
    end
  end

  task automatic set_coefs(input int mode);
    // mode 0: random small, 1: full-scale random, 2: impulse at centre
    for (int i = 0; i < NC1; i++)
      c1[i] = (mode == 2) ? ((i == NC1 - 1) ? 16'sd16384 : 16'sd0)
            : (mode == 1) ? 16'($urandom) : 16'(int'($urandom_range(0, 4000)) - 2000);
    for (int i = 0; i < NC2; i++)
      c2[i] = (mode == 1) ? 16'($urandom) : 16'(int'($urandom_range(0, 8000)) - 4000);
  endtask

  task automatic run(input int nsamp, input bit gaps);
    for (int s = 0; s < nsamp; s++) begin
      @(negedge clk);
      iv1 = 1; iv2 = 1;
      d1 = 10'($urandom); d2 = 10'($urandom);
      t1 = 13'($urandom); t2 = 13'($urandom);
      if (gaps) begin
        @(negedge clk);
        iv1 = 0; iv2 = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    @(negedge clk); iv1 = 0; iv2 = 0;
    repeat (8) @(negedge clk);   // drain before coefficients change
  endtask

  initial begin
    set_coefs(2);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(200, 0);                  // pass-through
    set_coefs(0); run(400, 0);    // even symmetry, back to back
    odd1 = 1; odd2 = 1; run(300, 1);  // odd symmetry, with gaps
    set_coefs(1); odd1 = 0; odd2 = 0; run(300, 0);  // full scale, clipping
    odd1 = 1; odd2 = 1; run(300, 0);
    check(q1.size() == 0 && q2.size() == 0, "all inputs produced outputs");
    check(outs1 == 1500 && outs2 == 1500, $sformatf("output counts %0d %0d", outs1, outs2));
    check(clipped_hi > 0 && clipped_lo > 0, $sformatf("clipping exercised %0d %0d", clipped_hi, clipped_lo));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
