// One node F_ij(z^M) of the fast filter bank.
//
// A complex FIR whose taps are spaced M input samples apart, i.e. a
// prototype low-pass H(z) interpolated to H(z^M) so that its response
// repeats every fs/M. The frequency shift that makes F_ij out of the stage
// prototype is carried in the complex coefficients, which software loads as
//   c[n] = h[n] * exp(j*w0*M*(n - D)),   D = (TAPS-1)/2,
// (modulation centred on the middle tap). With that choice the
// complementary response is simply the input delayed by D*M samples minus
// the original response, and the node gives both outputs, as every node of
// the bank tree does.
//
// The prototype is symmetric, so the coefficients are conjugate-symmetric,
// c[2D-n] = conj(c[n]), and only c[0..D] are stored. Each pair of taps n and
// 2D-n shares one complex coefficient: with a = x[nM] and b = x[(2D-n)M],
//   c*a + conj(c)*b = Re(c)*(a+b) + j*Im(c)*(a-b),
// so a node has D+1 coefficient multipliers (35/19/15 taps give 18/10/8,
// 70 for the whole bank, the count the architecture is sized for).
// The tree structure, the interpolation factors and the
// original/complementary pair follow the architecture; the prototype
// lengths, the coefficient load port, the single adder stage and the word
// widths are this design's choices.
//
// Interface: in_valid/in_data accept one sample per cycle (no
// backpressure). out_valid rises one cycle after in_valid, with out_orig and
// out_comp for that input sample. Coefficients c[0..D] are written through
// coef_we/coef_idx/coef_re/coef_im at any time (higher indices are
// ignored); rst clears them and the delay line, clear flushes only the
// delay line. Outputs are rounded from
// Q1.17 and saturated to 16 bits.
module ffb_filter
  import ldacs_pkg::*;
#(
  parameter int TAPS = 35,   // prototype length, odd
  parameter int M    = 4     // interpolation factor of this stage
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear,
  input  logic                 coef_we,
  input  logic [5:0]           coef_idx,
  input  logic signed [CW-1:0] coef_re,
  input  logic signed [CW-1:0] coef_im,
  input  logic                 in_valid,
  input  cplx_t                in_data,
  output logic                 out_valid,
  output cplx_t                out_orig,
  output cplx_t                out_comp
);

  localparam int D    = (TAPS - 1) / 2;
  localparam int LINE = (TAPS - 1) * M;   // delayed samples kept
  localparam int AW   = DW + CW + $clog2(TAPS) + 2;

  logic signed [CW-1:0] c_re [D+1];
  logic signed [CW-1:0] c_im [D+1];
  cplx_t                dly  [LINE];
  cplx_t                win  [LINE+1];    // win[0] = newest sample

  always_comb begin
    win[0] = in_data;
    for (int k = 0; k < LINE; k++) win[k+1] = dly[k];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 0; n <= D; n++) begin
        c_re[n] <= '0;
        c_im[n] <= '0;
      end
    end else if (coef_we) begin
      for (int n = 0; n <= D; n++) begin
        if (int'(coef_idx) == n) begin
          c_re[n] <= coef_re;
          c_im[n] <= coef_im;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      for (int k = 0; k < LINE; k++) dly[k] <= '0;
    end else if (in_valid) begin
      for (int k = 0; k < LINE; k++) dly[k] <= win[k];
    end
  end

  logic signed [AW-1:0] acc_re, acc_im;
  logic signed [DW:0]   diff_re, diff_im;
  logic signed [DW:0]   sum_re, sum_im, dif_re, dif_im;
  cplx_t                y;

  always_comb begin
    // centre tap: full complex product
    acc_re = AW'(win[D*M].re * c_re[D]) - AW'(win[D*M].im * c_im[D]);
    acc_im = AW'(win[D*M].im * c_re[D]) + AW'(win[D*M].re * c_im[D]);
    // tap pairs n, 2D-n sharing c[n]
    for (int n = 0; n < D; n++) begin
      sum_re = (DW+1)'(win[n*M].re) + (DW+1)'(win[(2*D-n)*M].re);
      sum_im = (DW+1)'(win[n*M].im) + (DW+1)'(win[(2*D-n)*M].im);
      dif_re = (DW+1)'(win[n*M].re) - (DW+1)'(win[(2*D-n)*M].re);
      dif_im = (DW+1)'(win[n*M].im) - (DW+1)'(win[(2*D-n)*M].im);
      acc_re += AW'(sum_re * c_re[n]) - AW'(dif_im * c_im[n]);
      acc_im += AW'(sum_im * c_re[n]) + AW'(dif_re * c_im[n]);
    end
    y.re    = round_sat(64'(acc_re), CFRAC);
    y.im    = round_sat(64'(acc_im), CFRAC);
    diff_re = (DW+1)'(win[D*M].re) - (DW+1)'(y.re);
    diff_im = (DW+1)'(win[D*M].im) - (DW+1)'(y.im);
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      out_valid <= 1'b0;
      out_orig  <= '0;
      out_comp  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_orig    <= y;
        out_comp.re <= sat17(diff_re);
        out_comp.im <= sat17(diff_im);
      end
    end
  end

endmodule
