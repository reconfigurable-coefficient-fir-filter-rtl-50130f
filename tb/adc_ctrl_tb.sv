// adc_ctrl_tb: runs the A/D control unit against a simple converter model.
//
// The model puts a new value on the data bus 1 ns after every rising edge of the
// converter clock (the count of conversions so far). Checked: STBY and 3-STATE
// held low; converter clock period CLK_DIV with 50% duty (4 MHz at the default
// 8 MHz fabric clock); one line of LINE_LEN samples after an SH pulse, with
// pixel indices 0..LINE_LEN-1, sol/eol flags, one sample every CLK_DIV clocks,
// each sample equal to the bus value at its capture edge and captured while the
// converter clock is low; an SH pulse during a line is ignored; a second line
// works. Two instances: the defaults (2048 pixels, divider 2) and divider 4 with
// 64-pixel lines.
module adc_ctrl_tb;
  import ccd_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #62.5 clk = ~clk;   // 8 MHz

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- DUT A: defaults
  logic sh_a = 0, aclk_a, stby_a, ts_a, ls_a, ign_a, busy_a, v_a;
  logic [ADC_W-1:0] bus_a = '0;
  pix_t px_a;
  adc_ctrl dut_a (.clk, .rst_n, .sh_trig(sh_a), .adc_data(bus_a), .adc_clk(aclk_a),
                  .adc_stby(stby_a), .adc_3state(ts_a), .line_start(ls_a),
                  .trig_ignored(ign_a), .busy(busy_a), .px(px_a), .px_valid(v_a));
  always @(posedge aclk_a) #1 bus_a <= bus_a + 1'b1;

  // ---------------------------------------------------------------- DUT B: div 4, 64 px
  logic sh_b = 0, aclk_b, stby_b, ts_b, ls_b, ign_b, busy_b, v_b;
  logic [ADC_W-1:0] bus_b = '0;
  pix_t px_b;
  adc_ctrl #(.CLK_DIV(4), .LINE_LEN(64)) dut_b (.clk, .rst_n, .sh_trig(sh_b), .adc_data(bus_b),
                  .adc_clk(aclk_b), .adc_stby(stby_b), .adc_3state(ts_b), .line_start(ls_b),
                  .trig_ignored(ign_b), .busy(busy_b), .px(px_b), .px_valid(v_b));
  always @(posedge aclk_b) #1 bus_b <= bus_b + 1'b1;

  // Monitor: bus and clock level seen at each edge, sample order and spacing.
  class mon_t;
    string     name;
    int        div, len;
    int        expect_pix = 0, last_cycle = -1, samples = 0, lines = 0;
    int        cycle = 0;
    function new(string n, int d, int l); name = n; div = d; len = l; endfunction
  endclass

  mon_t ma = new("A", 2, 2048);
  mon_t mb = new("B", 4, 64);
  logic [ADC_W-1:0] bus_at_edge_a, bus_at_edge_b;
  logic             aclk_at_edge_a, aclk_at_edge_b;
  int               hi_a = 0, lo_a = 0, hi_b = 0, lo_b = 0;

  always @(posedge clk) begin
    bus_at_edge_a  <= bus_a;  aclk_at_edge_a <= aclk_a;
    bus_at_edge_b  <= bus_b;  aclk_at_edge_b <= aclk_b;
    if (rst_n) begin
      if (aclk_a) hi_a++; else lo_a++;
      if (aclk_b) hi_b++; else lo_b++;
    end
  end

  task automatic observe(mon_t m, logic v, pix_t p, logic [ADC_W-1:0] bus_e, logic aclk_e, logic ls);
    m.cycle++;
    if (ls) m.expect_pix = 0;
    if (v) begin
      check(p.pixel == PIX_W'(m.expect_pix), $sformatf("%s pixel %0d want %0d", m.name, p.pixel, m.expect_pix));
      check(p.sol == (m.expect_pix == 0), $sformatf("%s sol at %0d", m.name, m.expect_pix));
      check(p.eol == (m.expect_pix == m.len - 1), $sformatf("%s eol at %0d", m.name, m.expect_pix));
      check(p.data == bus_e, $sformatf("%s data %0d want %0d", m.name, p.data, bus_e));
      check(aclk_e == 0, $sformatf("%s capture while converter clock low", m.name));
      if (m.expect_pix > 0)
        check(m.cycle - m.last_cycle == m.div, $sformatf("%s spacing %0d", m.name, m.cycle - m.last_cycle));
      m.last_cycle = m.cycle;
      m.expect_pix++;
      m.samples++;
      if (p.eol) m.lines++;
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    observe(ma, v_a, px_a, bus_at_edge_a, aclk_at_edge_a, ls_a);
    observe(mb, v_b, px_b, bus_at_edge_b, aclk_at_edge_b, ls_b);
  end

  int ign_cnt_a = 0, ign_cnt_b = 0;
  always @(posedge clk) begin
    if (ign_a) ign_cnt_a++;
    if (ign_b) ign_cnt_b++;
  end

  task automatic pulse_a();
    @(negedge clk) sh_a = 1;
    repeat (3) @(negedge clk);
    sh_a = 0;
  endtask
  task automatic pulse_b();
    @(negedge clk) sh_b = 1;
    repeat (3) @(negedge clk);
    sh_b = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    check(stby_a == 0 && ts_a == 0 && stby_b == 0 && ts_b == 0, "STBY and 3-STATE low");
    check(busy_a == 0 && busy_b == 0, "idle after reset");
    // first lines
    fork pulse_a(); pulse_b(); join
    repeat (100) @(negedge clk);
    // triggers during the lines are ignored
    fork pulse_a(); pulse_b(); join
    wait (busy_a == 0 && busy_b == 0);
    repeat (20) @(negedge clk);
    check(ma.lines == 1 && mb.lines == 1, $sformatf("one line each: %0d %0d", ma.lines, mb.lines));
    check(ma.samples == 2048 && mb.samples == 64, $sformatf("samples %0d %0d", ma.samples, mb.samples));
    check(ign_cnt_a == 1 && ign_cnt_b == 1, "trigger during line ignored");
    // second lines
    fork pulse_a(); pulse_b(); join
    wait (busy_a == 1 && busy_b == 1);
    wait (busy_a == 0 && busy_b == 0);
    repeat (20) @(negedge clk);
    check(ma.lines == 2 && mb.lines == 2, "second line");
    check(ma.samples == 4096 && mb.samples == 128, "second line samples");
    // converter clock duty: 50 %
    check(hi_a == lo_a || hi_a == lo_a + 1 || hi_a + 1 == lo_a, $sformatf("A duty %0d/%0d", hi_a, lo_a));
    check(hi_b - lo_b <= 2 && lo_b - hi_b <= 2, $sformatf("B duty %0d/%0d", hi_b, lo_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
