// fir_filter: linear-phase direct-form FIR filter with downloadable coefficients.
//
// H(z) = sum h(n) z^-n, n = 0..NTAPS-1, with h(n) = h(N-1-n) (even symmetry) or
// h(n) = -h(N-1-n) (odd symmetry). As in the direct linear-phase structure of
// the original design, the two taps that share a coefficient are first combined
// by a pre-adder, x(n-k) + x(n-N+1+k) or x(n-k) - x(n-N+1+k), so NTAPS taps need
// only NC = ceil(NTAPS/2) multipliers. For odd NTAPS the centre tap x(n-(N-1)/2)
// is multiplied by h((N-1)/2) alone; in odd-symmetry mode that coefficient is
// zero by definition, and the filter forces the centre term to zero. The default
// of 33 taps is the original's 32nd-order filter.
//
// Number formats (this design's choice): input samples are unsigned straight
// binary, DIN_W bits, as the converter delivers them; coefficients are signed
// with COEF_FRAC fraction bits (default Q1.14 in 16 bits, so 1.0 = 16384). The
// full-precision sum is given on y_full (signed, scaled by 2^COEF_FRAC); y is
// that sum rounded to an integer and clipped to the unsigned DIN_W-bit range,
// so the filtered line can be processed like the raw one.
//
// Timing: one sample per clock at most, on in_valid. The sample enters the delay
// line at the clock edge that ends its in_valid cycle; pre-adders, multipliers
// and the adder tree each take one more registered stage, so out_valid comes
// 4 cycles after in_valid. in_tag is an opaque sideband carried along
// with the sample so that the output can be matched to the newest input sample
// it contains. No stall: the pipeline advances every clock.
module fir_filter #(
  parameter int unsigned NTAPS     = 33,
  parameter int unsigned DIN_W     = 10,
  parameter int unsigned COEF_W    = 16,
  parameter int unsigned COEF_FRAC = 14,
  parameter int unsigned TAG_W     = 13,
  localparam int unsigned NC       = (NTAPS + 1) / 2,
  localparam int unsigned PRE_W    = DIN_W + 2,
  localparam int unsigned PROD_W   = PRE_W + COEF_W,
  localparam int unsigned ACC_W    = PROD_W + $clog2(NC + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [COEF_W-1:0] coef [NC],  // h(0) .. h(NC-1)
  input  logic                     odd_sym,
  input  logic                     in_valid,
  input  logic [DIN_W-1:0]         in_data,
  input  logic [TAG_W-1:0]         in_tag,
  output logic                     out_valid,
  output logic [DIN_W-1:0]         y,
  output logic signed [ACC_W-1:0]  y_full,
  output logic [TAG_W-1:0]         out_tag
);

  logic [DIN_W-1:0]         x   [NTAPS];   // x[k] = x(n-k)
  logic signed [PRE_W-1:0]  pre [NC];
  logic signed [PROD_W-1:0] prod[NC];
  logic [2:0]               v;
  logic [TAG_W-1:0]         tag [3];
  logic signed [ACC_W-1:0]  sum;
  logic [DIN_W-1:0]         y_sat;

  // delay line
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) x[k] <= '0;
    end else if (in_valid) begin
      x[0] <= in_data;
      for (int k = 1; k < NTAPS; k++) x[k] <= x[k-1];
    end
  end

  // pre-adders, multipliers, adder tree: one register stage each
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NC; k++) begin
        pre[k]  <= '0;
        prod[k] <= '0;
      end
      v         <= '0;
      out_valid <= 1'b0;
      y         <= '0;
      y_full    <= '0;
      out_tag   <= '0;
      for (int s = 0; s < 3; s++) tag[s] <= '0;
    end else begin
      v         <= {v[1:0], in_valid};
      out_valid <= v[2];
      if (in_valid) tag[0] <= in_tag;
      tag[1] <= tag[0];
      tag[2] <= tag[1];
      for (int k = 0; k < NC; k++) begin
        if (NTAPS % 2 == 1 && k == NC - 1)
          pre[k] <= odd_sym ? '0 : PRE_W'(x[k]);
        else if (odd_sym)
          pre[k] <= PRE_W'(x[k]) - PRE_W'(x[NTAPS-1-k]);
        else
          pre[k] <= PRE_W'(x[k]) + PRE_W'(x[NTAPS-1-k]);
        prod[k] <= pre[k] * PROD_W'(coef[k]);
      end
      if (v[2]) begin
        y       <= y_sat;
        y_full  <= sum;
        out_tag <= tag[2];
      end
    end
  end

  // adder tree over the products, then round half up and clip to 0..2^DIN_W-1
  always_comb begin
    logic signed [ACC_W-1:0] r;
    sum = '0;
    for (int k = 0; k < NC; k++) sum += ACC_W'(prod[k]);
    r = (sum + (ACC_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (r < 0)                               y_sat = '0;
    else if (r > ACC_W'((1 << DIN_W) - 1))   y_sat = '1;
    else                                     y_sat = r[DIN_W-1:0];
  end

  initial begin
    assert (NTAPS >= 2) else $error("fir_filter: NTAPS must be at least 2");
    assert (COEF_FRAC >= 1 && COEF_FRAC < COEF_W)
      else $error("fir_filter: COEF_FRAC out of range");
  end

endmodule
