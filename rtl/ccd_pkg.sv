// ccd_pkg: widths, FIFO record codes and the tagged sample stream shared by the
// CCD defect-inspection front end.
//
// A sample on its way from the converter to the defect detector travels as a
// pix_t: the 10-bit converter value, the pixel index within the CCD line and
// start/end-of-line flags. Defect records written into the FIFO are 16-bit
// words: 16'hFFFF marks the start of a line, a word with bit 15 set carries the
// index of one defective pixel, and a word with bit 15 clear closes a run of
// defective pixels and carries the line number. The line flag and the bit-15
// defect mark follow the record format of the original design; the meaning of
// the closing word (line number) is this design's reading of it.
package ccd_pkg;

  localparam int unsigned ADC_W  = 10;   // AD9203 data width
  localparam int unsigned PIX_W  = 11;   // pixel index, lines of up to 2048 pixels
  localparam int unsigned WORD_W = 16;   // FIFO record width

  localparam logic [WORD_W-1:0] LINE_FLAG   = 16'hFFFF;
  localparam int unsigned       DEFECT_BIT  = 15;

  // One tagged sample of a CCD line.
  typedef struct packed {
    logic             sol;    // first pixel of the line
    logic             eol;    // last pixel of the line
    logic [PIX_W-1:0] pixel;  // pixel index within the line
    logic [ADC_W-1:0] data;   // sample value, straight binary
  } pix_t;

  // Record for a defective pixel.
  function automatic logic [WORD_W-1:0] defect_word(input logic [PIX_W-1:0] pixel);
    logic [WORD_W-1:0] w;
    w = '0;
    w[DEFECT_BIT] = 1'b1;
    w[PIX_W-1:0]  = pixel;
    return w;
  endfunction

  // Record that closes a run of defective pixels: the line number, bit 15 clear.
  function automatic logic [WORD_W-1:0] run_end_word(input logic [WORD_W-2:0] line_no);
    return {1'b0, line_no};
  endfunction

endpackage
