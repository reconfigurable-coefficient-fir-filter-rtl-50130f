// defect_detect: marks pixels below the line threshold and writes defect records.
//
// Every sample of a line is compared with the threshold of that line (from
// dyn_threshold); a sample strictly below it is a defect pixel. The detector
// writes 16-bit records into the defect FIFO:
//
//   16'hFFFF             at the first pixel of every line (line flag)
//   16'h8000 | pixel     for every defect pixel (bit 15 marks a defect)
//   {1'b0, line_no}      after the last pixel of a run of defect pixels
//                        (also when a run reaches the end of the line)
//
// The line flag and the bit-15 marked pixel records follow the original design.
// The closing record of a run is this design's reading of the original's
// "bottom position" word: the number of the line (position along the direction
// the film moves), 15 bits, counted from reset and incremented after every
// line end.
//
// Timing: a sample can need two records (line flag + defect at the first pixel,
// defect + run end at the last one). The first is written in the cycle after the
// sample, the second one cycle later, so px_valid must not be high in two
// consecutive cycles (the converter delivers a sample every CLK_DIV >= 2
// clocks; an assertion checks it).
module defect_detect
  import ccd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  pix_t              px,
  input  logic              px_valid,
  input  logic [ADC_W-1:0]  threshold,
  output logic              wr_en,
  output logic [WORD_W-1:0] wr_data,
  output logic              defect,      // one-clock pulse per defect pixel
  output logic [WORD_W-2:0] line_no
);

  logic              in_run;
  logic              pend;
  logic [WORD_W-1:0] pend_word;
  logic              is_def;

  assign is_def = px.data < threshold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_run    <= 1'b0;
      pend      <= 1'b0;
      pend_word <= '0;
      wr_en     <= 1'b0;
      wr_data   <= '0;
      defect    <= 1'b0;
      line_no   <= '0;
    end else begin
      wr_en  <= 1'b0;
      defect <= 1'b0;
      pend   <= 1'b0;
      if (pend) begin
        wr_en   <= 1'b1;
        wr_data <= pend_word;
      end
      if (px_valid) begin
        defect <= is_def;
        in_run <= is_def && !px.eol;
        if (px.eol) line_no <= line_no + 1'b1;
        if (px.sol) begin
          wr_en   <= 1'b1;
          wr_data <= LINE_FLAG;
          if (is_def) begin
            pend      <= 1'b1;
            pend_word <= defect_word(px.pixel);
          end
        end else if (is_def) begin
          wr_en   <= 1'b1;
          wr_data <= defect_word(px.pixel);
        end else if (in_run) begin
          wr_en   <= 1'b1;
          wr_data <= run_end_word(line_no);
        end
        // a run still open at the end of the line is closed right away
        if (is_def && px.eol) begin
          pend      <= 1'b1;
          pend_word <= run_end_word(line_no);
        end
      end
    end
  end

  // two records per sample need a free cycle after each sample
  assert property (@(posedge clk) disable iff (!rst_n) px_valid |=> !px_valid)
    else $error("defect_detect: samples in consecutive cycles");

endmodule
