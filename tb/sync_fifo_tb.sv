// sync_fifo_tb: random reads and writes against a queue model on a 16-deep
// FIFO, then the default 4096 x 16 FIFO filled to the brim. Checked: data
// order, one-cycle read latency (rd_valid), empty/full/count, dropping of
// writes into a full FIFO with the dropped pulse and the sticky overflow flag,
// and simultaneous read and write.
module sync_fifo_tb;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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

  // small FIFO
  logic we = 0, re = 0, rv, em, fu, dr, ov;
  logic [15:0] wd = 0, rd;
  logic [4:0] cnt;
  sync_fifo #(.DEPTH(16)) dut (.clk, .rst_n, .wr_en(we), .wr_data(wd), .rd_en(re), .rd_data(rd),
                               .rd_valid(rv), .empty(em), .full(fu), .count(cnt), .dropped(dr), .overflow(ov));

  // default FIFO
  logic we2 = 0, re2 = 0, rv2, em2, fu2, dr2, ov2;
  logic [15:0] wd2 = 0, rd2;
  logic [12:0] cnt2;
  sync_fifo dut2 (.clk, .rst_n, .wr_en(we2), .wr_data(wd2), .rd_en(re2), .rd_data(rd2),
                  .rd_valid(rv2), .empty(em2), .full(fu2), .count(cnt2), .dropped(dr2), .overflow(ov2));

  logic [15:0] model[$];
  logic [15:0] pending[$];   // words read, due on rd_data next cycle
  int drops = 0, both = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(em && !fu && cnt == 0 && !ov, "reset state");
    for (int t = 0; t < 3000; t++) begin
      bit exp_drop, do_rd;
      // phase: fill-heavy, then drain-heavy, then mixed
      int pw;
      pw = (t < 1000) ? 80 : (t < 2000) ? 20 : 50;
      we = ($urandom_range(0, 99) < pw);
      re = ($urandom_range(0, 99) < 100 - pw);
      wd = 16'($urandom);
      // checks of the state before the edge
      check(cnt == 5'(model.size()), $sformatf("count %0d want %0d", cnt, model.size()));
      check(em == (model.size() == 0), "empty");
      check(fu == (model.size() == 16), "full");
      exp_drop = we && model.size() == 16;
      do_rd = re && model.size() > 0;
      if (we && re && model.size() > 0 && model.size() < 16) both++;
      @(posedge clk);
      if (do_rd) pending.push_back(model.pop_front());
      if (we && !exp_drop) model.push_back(wd);
      if (exp_drop) drops++;
      @(negedge clk);
      check(dr == exp_drop, "dropped pulse");
      check(rv == do_rd, "rd_valid");
      if (do_rd) begin
        logic [15:0] e;
        e = pending.pop_front();
        check(rd == e, $sformatf("read %h want %h", rd, e));
      end
      if (drops > 0) check(ov, "overflow sticky");
    end
    we = 0; re = 0;
    check(drops > 0 && both > 0, $sformatf("drops %0d simultaneous %0d", drops, both));

    // default size: fill 4096 words, one more is dropped, read all back
    for (int i = 0; i < 4097; i++) begin
      we2 = 1; wd2 = 16'(i * 7 + 3);
      @(negedge clk);
    end
    we2 = 0;
    check(fu2 && cnt2 == 13'd4096, $sformatf("default FIFO full at %0d", cnt2));
    check(ov2, "default FIFO overflow");
    for (int i = 0; i < 4096; i++) begin
      re2 = 1;
      @(negedge clk);
      check(rv2 && rd2 == 16'(i * 7 + 3), $sformatf("default FIFO word %0d: %h", i, rd2));
    end
    re2 = 0;
    @(negedge clk);
    check(em2, "default FIFO empty again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
