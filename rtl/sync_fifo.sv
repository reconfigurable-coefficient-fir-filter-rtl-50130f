// sync_fifo: single-clock FIFO buffering defect records for the host link.
//
// DEPTH words of WIDTH bits in one memory array (block RAM). The default of
// 4096 x 16 bits = 65,536 bits matches the 71% memory use reported for the
// original design on a device with 92,160 RAM bits; the original used the FPGA
// vendor's FIFO macro, whose configuration it does not give.
//
// Interface: wr_en writes wr_data unless the FIFO is full; a write into a full
// FIFO is dropped, pulses `dropped` and sets the sticky `overflow` flag
// (cleared by reset only). rd_en reads the oldest word unless the FIFO is
// empty; the word appears on rd_data with rd_valid in the next cycle. A read
// and a write may happen in the same cycle. `count` is the fill level.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count,
  output logic             dropped,
  output logic             overflow
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  // memory: no reset, so it maps onto block RAM
  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
    if (do_rd) rd_data <= mem[rptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      rd_valid <= 1'b0;
      dropped  <= 1'b0;
      overflow <= 1'b0;
    end else begin
      rd_valid <= do_rd;
      dropped  <= wr_en && full;
      if (wr_en && full) overflow <= 1'b1;
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  initial assert (DEPTH >= 2) else $error("sync_fifo: DEPTH must be at least 2");

endmodule
