// dyn_threshold: per-line dynamic defect threshold, 75% of the line average.
//
// The light level of a CCD line drifts (lamp fluctuation, uneven film), so the
// level under which a pixel counts as a defect follows the signal: 75% of the
// average of one line is the threshold of the next line. Adding all 2048 samples
// would cost too much logic, so the average is estimated from 64 samples spaced
// evenly along the line, as in the original design:
//
//   * the pixel index selects every STRIDE-th sample (STRIDE = LINE_LEN/64),
//     the one at offset OFFSET within each STRIDE-pixel segment;
//   * an eight-way selector files the selected samples into an 8-entry group
//     register; when a group of eight is complete, adder array 1 (adder_tree8)
//     adds it into group sum S1..S8;
//   * after the eighth group, adder array 2 adds S1..S8 into S;
//   * S >> 6 is the average A, and (A >> 1) + (A >> 2) the new threshold.
//
// The sampling offset is this design's choice: OFFSET = 15 takes the middle of
// each 32-pixel segment, which for a 0..1023, 0..1023 ramp line gives the
// threshold 382 (exact 75% of the mean: 383.625), the value the original design
// reports for that test line.
//
// Timing: a group sum is registered one clock after its eighth sample, the new
// threshold one clock after the last group sum. The new value moves to
// `threshold` only once the line has ended (eol sample seen), so a line is always
// judged by the previous line's threshold. After reset `threshold` is 0 and
// `thr_valid` low until the first complete line. Incomplete lines (no eol) do
// not update the threshold: a new sol restarts the collection.
module dyn_threshold
  import ccd_pkg::*;
#(
  parameter int unsigned LINE_LEN = 2048,
  parameter int unsigned OFFSET   = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pix_t             px,
  input  logic             px_valid,
  output logic [ADC_W-1:0] threshold,   // threshold for the current line
  output logic             thr_valid,   // threshold comes from a measured line
  output logic             thr_update,  // one-clock pulse: threshold changed
  output logic [ADC_W+5:0] line_sum     // S of the last finished line
);

  localparam int unsigned NSAMP  = 64;
  localparam int unsigned STRIDE = LINE_LEN / NSAMP;
  localparam int unsigned GS_W   = ADC_W + 3;   // group sum width
  localparam int unsigned S_W    = ADC_W + 6;   // line sum width

  logic [ADC_W-1:0] grp   [8];   // eight-way selector targets
  logic [GS_W-1:0]  gsum  [8];   // S1..S8
  logic [GS_W-1:0]  gsum_c;
  logic [S_W-1:0]   lsum_c;
  logic [ADC_W-1:0] avg_c;       // S >> 6
  logic             take;
  logic [5:0]       idx;         // index of the selected sample, 0..63
  logic             grp_done, line_done;
  logic [2:0]       grp_no;
  logic [ADC_W-1:0] thr_next;
  logic             next_ready, eol_seen;
  logic [6:0]       grp_seen;    // groups 1..7 of the current line already summed

  assign take = px_valid && (32'(px.pixel) % STRIDE == OFFSET);
  assign idx  = 6'(32'(px.pixel) / STRIDE);

  assign avg_c = ADC_W'(lsum_c >> 6);

  adder_tree8 #(.IN_W(ADC_W)) u_array1 (.a(grp),  .sum(gsum_c));
  adder_tree8 #(.IN_W(GS_W))  u_array2 (.a(gsum), .sum(lsum_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) begin
        grp[i]  <= '0;
        gsum[i] <= '0;
      end
      grp_done   <= 1'b0;
      line_done  <= 1'b0;
      grp_no     <= '0;
      grp_seen   <= '0;
      thr_next   <= '0;
      next_ready <= 1'b0;
      eol_seen   <= 1'b0;
      threshold  <= '0;
      thr_valid  <= 1'b0;
      thr_update <= 1'b0;
      line_sum   <= '0;
    end else begin
      grp_done   <= 1'b0;
      line_done  <= 1'b0;
      thr_update <= 1'b0;

      if (px_valid && px.sol) begin
        grp_seen   <= '0;
        next_ready <= 1'b0;
        eol_seen   <= 1'b0;
      end
      if (take) begin
        grp[idx[2:0]] <= px.data;
        if (idx[2:0] == 3'd7) begin
          grp_done <= 1'b1;
          grp_no   <= idx[5:3];
        end
      end
      // adder array 1: group sum S(g+1)
      if (grp_done) begin
        gsum[grp_no] <= gsum_c;
        if (grp_no != 3'd7)     grp_seen[grp_no] <= 1'b1;
        else if (&grp_seen)     line_done <= 1'b1;
      end
      // adder array 2, average and 75 %
      if (line_done) begin
        line_sum   <= lsum_c;
        thr_next   <= (avg_c >> 1) + (avg_c >> 2);
        next_ready <= 1'b1;
      end
      if (px_valid && px.eol) eol_seen <= 1'b1;
      // hand over once the line is both measured and finished
      if (next_ready && eol_seen) begin
        threshold  <= thr_next;
        thr_valid  <= 1'b1;
        thr_update <= 1'b1;
        next_ready <= 1'b0;
        eol_seen   <= 1'b0;
      end
    end
  end

  initial begin
    assert (LINE_LEN % NSAMP == 0 && LINE_LEN >= NSAMP)
      else $error("dyn_threshold: LINE_LEN must be a multiple of 64");
    assert (OFFSET < STRIDE) else $error("dyn_threshold: OFFSET must be below STRIDE");
  end

endmodule
