// coef_bank: downloadable coefficient store of the linear-phase FIR filter.
//
// A linear-phase filter of N taps needs only h(0)..h((N-1)/2): the other half
// follows from the symmetry h(n) = +/-h(N-1-n). The host writes those NC
// coefficients and a control word through a simple register port, so the
// filter's response can be changed while the system runs, which is the point of
// the original design (coefficients computed on a computer and downloaded). The
// register map and the reset contents are this design's choice:
//
//   addr 0 .. NC-1   coefficient h(addr), signed, COEF_W bits
//   addr CTRL_ADDR   bit 0: 1 = odd (anti-)symmetry, 0 = even symmetry
//
// Reset loads a pass-through response: every coefficient zero except the centre
// tap (odd N) or the two middle taps (even N), set to 1.0 resp. 0.5 in the
// filter's fixed-point format with COEF_FRAC fraction bits.
//
// Timing: a write (we high for one clock) takes effect at the next clock edge;
// the new values are visible on coef/odd_sym from the following cycle. A write
// to any other address is ignored and pulses bad_addr.
module coef_bank #(
  parameter int unsigned NTAPS     = 33,
  parameter int unsigned COEF_W    = 16,
  parameter int unsigned COEF_FRAC = 14,
  parameter int unsigned ADDR_W    = 6,
  parameter int unsigned CTRL_ADDR = 63,
  localparam int unsigned NC       = (NTAPS + 1) / 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [ADDR_W-1:0]        addr,
  input  logic [COEF_W-1:0]        wdata,
  output logic signed [COEF_W-1:0] coef [NC],
  output logic                     odd_sym,
  output logic                     bad_addr
);

  localparam int unsigned IW = (NC > 1) ? $clog2(NC) : 1;
  localparam logic signed [COEF_W-1:0] ONE  = COEF_W'(1) <<< COEF_FRAC;
  localparam logic signed [COEF_W-1:0] HALF = COEF_W'(1) <<< (COEF_FRAC - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NC; i++)
        coef[i] <= (i == NC - 1) ? ((NTAPS % 2 == 1) ? ONE : HALF) : '0;
      odd_sym  <= 1'b0;
      bad_addr <= 1'b0;
    end else begin
      bad_addr <= 1'b0;
      if (we) begin
        if (32'(addr) < NC)                   coef[addr[IW-1:0]] <= wdata;
        else if (addr == ADDR_W'(CTRL_ADDR))  odd_sym    <= wdata[0];
        else                                  bad_addr   <= 1'b1;
      end
    end
  end

  initial begin
    assert (NC <= (1 << ADDR_W) && CTRL_ADDR >= NC && CTRL_ADDR < (1 << ADDR_W))
      else $error("coef_bank: address map does not fit ADDR_W");
    assert (COEF_FRAC >= 1 && COEF_FRAC < COEF_W - 1)
      else $error("coef_bank: COEF_FRAC out of range");
  end

endmodule
