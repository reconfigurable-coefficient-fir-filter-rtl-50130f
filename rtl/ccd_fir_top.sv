// ccd_fir_top: FPGA front end of a CCD defect-inspection system with a
// reconfigurable low-pass FIR filter.
//
// Data path, one CCD line at a time:
//
//   AD9203 --> adc_ctrl --> fir_filter --+--> dyn_threshold --threshold--+
//   (pins)     (4 MHz,       (33 taps,    |                               |
//              SH framing)   host coefs)  +--> defect_detect <------------+
//                                         |        |
//                                         |        v
//                                         |     sync_fifo --> host read port
//                                         +--> filtered stream (host upload)
//
// adc_ctrl clocks the converter and tags each sample with its pixel index.
// fir_filter low-pass filters the line with coefficients the host downloads
// through the cfg_* register port (coef_bank). The filtered line goes to the
// host as a stream (filt_*) and to the defect path: dyn_threshold turns 75% of
// the line's average into the next line's threshold, defect_detect writes line
// flags and defect records into the FIFO, which the host side drains.
//
// The USB 2.0 controller, the PLL and the converter are outside this module: clk
// is the PLL output (default 8 MHz, twice the 4 MHz sampling clock), the cfg_*,
// filt_* and fifo_* ports are where the USB side connects, and the adc_* ports go
// to the converter pins.
//
// Pixel positions in the defect records are those of the newest sample in the
// filter window; a linear-phase filter delays the line by (NTAPS-1)/2 pixels, so
// a feature at pixel p shows up at p + (NTAPS-1)/2 (16 with the default filter).
// The filter window runs across line boundaries (the delay line is not cleared
// between lines).
module ccd_fir_top
  import ccd_pkg::*;
#(
  parameter int unsigned CLK_DIV    = 2,
  parameter int unsigned LINE_LEN   = 2048,
  parameter int unsigned NTAPS      = 33,
  parameter int unsigned COEF_W     = 16,
  parameter int unsigned COEF_FRAC  = 14,
  parameter int unsigned THR_OFFSET = 15,
  parameter int unsigned FIFO_DEPTH = 4096,
  localparam int unsigned NC        = (NTAPS + 1) / 2,
  localparam int unsigned ACC_W     = ADC_W + 2 + COEF_W + $clog2(NC + 1),
  localparam int unsigned FAW       = $clog2(FIFO_DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // CCD driver and converter
  input  logic                    sh_trig,
  input  logic [ADC_W-1:0]        adc_data,
  output logic                    adc_clk,
  output logic                    adc_stby,
  output logic                    adc_3state,
  // host: coefficient download
  input  logic                    cfg_we,
  input  logic [5:0]              cfg_addr,
  input  logic [COEF_W-1:0]       cfg_wdata,
  output logic                    cfg_bad_addr,
  // host: filtered-data upload
  output logic                    filt_valid,
  output pix_t                    filt_px,
  output logic signed [ACC_W-1:0] filt_full,
  // host: defect FIFO
  input  logic                    fifo_rd_en,
  output logic [WORD_W-1:0]       fifo_rd_data,
  output logic                    fifo_rd_valid,
  output logic                    fifo_empty,
  output logic [FAW:0]            fifo_count,
  output logic                    fifo_full,
  output logic                    fifo_dropped,
  output logic                    fifo_overflow,
  // status
  output logic                    line_busy,
  output logic                    line_start,
  output logic                    trig_ignored,
  output logic [ADC_W-1:0]        threshold,
  output logic                    thr_valid,
  output logic                    thr_update,
  output logic [ADC_W+5:0]        line_sum,
  output logic                    defect,
  output logic [WORD_W-2:0]       line_no
);

  localparam int unsigned TAG_W = PIX_W + 2;

  pix_t                    raw_px;
  logic                    raw_valid;
  logic signed [COEF_W-1:0] coef [NC];
  logic                    odd_sym;
  logic [TAG_W-1:0]        ftag;
  logic [ADC_W-1:0]        fy;
  logic                    det_we;
  logic [WORD_W-1:0]       det_word;

  adc_ctrl #(.CLK_DIV(CLK_DIV), .LINE_LEN(LINE_LEN)) u_adc (
    .clk, .rst_n, .sh_trig, .adc_data, .adc_clk, .adc_stby, .adc_3state,
    .line_start, .trig_ignored, .busy(line_busy),
    .px(raw_px), .px_valid(raw_valid)
  );

  coef_bank #(.NTAPS(NTAPS), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) u_coef (
    .clk, .rst_n, .we(cfg_we), .addr(cfg_addr), .wdata(cfg_wdata),
    .coef, .odd_sym, .bad_addr(cfg_bad_addr)
  );

  fir_filter #(.NTAPS(NTAPS), .DIN_W(ADC_W), .COEF_W(COEF_W),
               .COEF_FRAC(COEF_FRAC), .TAG_W(TAG_W)) u_fir (
    .clk, .rst_n, .coef, .odd_sym,
    .in_valid(raw_valid), .in_data(raw_px.data),
    .in_tag({raw_px.sol, raw_px.eol, raw_px.pixel}),
    .out_valid(filt_valid), .y(fy), .y_full(filt_full), .out_tag(ftag)
  );

  always_comb begin
    filt_px.sol   = ftag[TAG_W-1];
    filt_px.eol   = ftag[TAG_W-2];
    filt_px.pixel = ftag[PIX_W-1:0];
    filt_px.data  = fy;
  end

  dyn_threshold #(.LINE_LEN(LINE_LEN), .OFFSET(THR_OFFSET)) u_thr (
    .clk, .rst_n, .px(filt_px), .px_valid(filt_valid),
    .threshold, .thr_valid, .thr_update, .line_sum
  );

  defect_detect u_det (
    .clk, .rst_n, .px(filt_px), .px_valid(filt_valid), .threshold,
    .wr_en(det_we), .wr_data(det_word), .defect, .line_no
  );

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en(det_we), .wr_data(det_word),
    .rd_en(fifo_rd_en), .rd_data(fifo_rd_data), .rd_valid(fifo_rd_valid),
    .empty(fifo_empty), .full(fifo_full), .count(fifo_count),
    .dropped(fifo_dropped), .overflow(fifo_overflow)
  );

endmodule
