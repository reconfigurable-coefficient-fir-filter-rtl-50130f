// adc_ctrl: A/D control unit for the AD9203 converter and CCD line framing.
//
// The converter needs a sampling clock on CLK and static levels on STBY and
// 3-STATE. This unit drives STBY low (normal operation) and 3-STATE low
// (outputs enabled), as the original design does, and makes the converter clock
// by dividing the fabric clock by CLK_DIV (default 2: an 8 MHz fabric clock gives
// the 4 MHz sampling clock). The fabric clock rate and the divider are this
// design's choice; the 4 MHz sampling rate and 2048 samples per line are the
// original design's.
//
// The CCD driver's SH pulse (sh_trig, asynchronous, synchronised here) starts a
// line: line_start pulses for one clock, then the next LINE_LEN converter samples
// leave on px/px_valid tagged with pixel index 0..LINE_LEN-1 and sol/eol flags.
// An SH pulse that arrives while a line is still being read is ignored
// (trig_ignored pulses).
//
// Timing: adc_clk is high for the second half of each CLK_DIV-cycle period. The
// data bus is registered in the cycle that ends the low half of the period,
// i.e. half a converter period after the previous rising edge; px_valid is
// high for one clock per converter period. The converter's own pipeline delay
// is not compensated: the first tagged sample is the first one registered after
// line_start.
module adc_ctrl
  import ccd_pkg::*;
#(
  parameter int unsigned CLK_DIV  = 2,
  parameter int unsigned LINE_LEN = 2048
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sh_trig,      // CCD line trigger (SH), asynchronous
  input  logic [ADC_W-1:0] adc_data,     // AD9203 data bus
  output logic             adc_clk,      // AD9203 CLK pin
  output logic             adc_stby,     // AD9203 STBY pin, low = normal mode
  output logic             adc_3state,   // AD9203 3-STATE pin, low = outputs on
  output logic             line_start,   // one-clock pulse, a line begins
  output logic             trig_ignored, // one-clock pulse, SH came during a line
  output logic             busy,         // a line is being read
  output pix_t             px,
  output logic             px_valid
);

  localparam int unsigned DIV_W = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  logic [DIV_W-1:0] div_cnt;
  logic [2:0]       sh_sync;            // two synchroniser stages + edge history
  logic             sh_rise;
  logic             strobe;             // capture the data bus this cycle
  logic [PIX_W-1:0] pix_cnt;

  assign adc_stby   = 1'b0;
  assign adc_3state = 1'b0;
  assign sh_rise    = sh_sync[1] & ~sh_sync[2];
  assign strobe     = (div_cnt == DIV_W'(CLK_DIV/2 - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      adc_clk <= 1'b0;
    end else begin
      if (div_cnt == DIV_W'(CLK_DIV - 1)) div_cnt <= '0;
      else                                div_cnt <= div_cnt + 1'b1;
      // register the clock level that belongs to the next counter value
      adc_clk <= (div_cnt == DIV_W'(CLK_DIV - 1)) ? 1'b0
               : ((32'(div_cnt) + 1) >= CLK_DIV/2);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_sync      <= '0;
      busy         <= 1'b0;
      pix_cnt      <= '0;
      line_start   <= 1'b0;
      trig_ignored <= 1'b0;
      px_valid     <= 1'b0;
      px           <= '0;
    end else begin
      sh_sync      <= {sh_sync[1:0], sh_trig};
      line_start   <= 1'b0;
      trig_ignored <= 1'b0;
      px_valid     <= 1'b0;
      if (sh_rise && busy) trig_ignored <= 1'b1;
      if (sh_rise && !busy) begin
        busy       <= 1'b1;
        pix_cnt    <= '0;
        line_start <= 1'b1;
      end else if (busy && strobe) begin
        px_valid <= 1'b1;
        px.data  <= adc_data;
        px.pixel <= pix_cnt;
        px.sol   <= (pix_cnt == '0);
        px.eol   <= (pix_cnt == PIX_W'(LINE_LEN - 1));
        pix_cnt  <= pix_cnt + 1'b1;
        if (pix_cnt == PIX_W'(LINE_LEN - 1)) busy <= 1'b0;
      end
    end
  end

  initial begin
    assert (CLK_DIV >= 2 && CLK_DIV % 2 == 0)
      else $error("adc_ctrl: CLK_DIV must be even and at least 2");
    assert (LINE_LEN >= 2 && LINE_LEN <= (1 << PIX_W))
      else $error("adc_ctrl: LINE_LEN out of range");
  end

endmodule
