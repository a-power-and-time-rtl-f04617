// Transmit channel filter: order-200 linear-phase low-pass FIR in
// transposed direct form.
//
// The filter shapes the transmitted LDACS1 channel to the spectral mask.
// Its 201 coefficients are symmetric, h[k] = h[200-k], so only 101 distinct
// values are stored and each input value is multiplied by those 101
// values once; every product feeds the two transposed-form adders that use
// it. The same real filter is applied to I and Q, which take turns on the
// one set of 101 multipliers: a complex sample is accepted, its I part is
// multiplied in that cycle and its Q part in the next, and I and Q keep
// their own adder chains, each advanced only on its own turn. The order,
// the 101 coefficient multipliers and the transposed direct form follow the
// architecture; the coefficient load port, the word widths, the I/Q
// time-sharing and the two-stage pipeline are this design's choices (the
// designed coefficients are not part of the RTL and are loaded by
// software).
//
// Interface: in_valid/in_ready/in_data accept one complex sample at most
// every second cycle (in_ready is low in the cycle after an accepted
// sample, while its Q part is multiplied). out_valid/out_data appear three
// cycles after the cycle in which the sample is offered and accepted.
// coef_we/coef_idx/coef_data write h[coef_idx] (= h[200-coef_idx]), Q1.17. rst clears coefficients and
// state; clear flushes only the pipeline and the adder chains. Output is
// rounded and saturated to 16 bits.
module channel_filter
  import ldacs_pkg::*;
#(
  parameter int ORDER = 200
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear,
  input  logic                 coef_we,
  input  logic [6:0]           coef_idx,
  input  logic signed [CW-1:0] coef_data,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  cplx_t                in_data,
  output logic                 out_valid,
  output cplx_t                out_data
);

  localparam int NCOEF = ORDER / 2 + 1;              // 101
  localparam int PW    = DW + CW;                    // product width
  localparam int AW    = PW + $clog2(ORDER + 1) + 1;

  logic signed [CW-1:0] h    [NCOEF];
  logic signed [PW-1:0] p    [NCOEF];
  logic signed [AW-1:0] s_re [1:ORDER];
  logic signed [AW-1:0] s_im [1:ORDER];
  logic                 p_valid, p_is_q;
  logic                 q_pend;
  logic signed [DW-1:0] q_hold;
  logic signed [DW-1:0] re_hold;
  logic signed [DW-1:0] x;
  logic                 accept;

  function automatic int cidx(input int k);
    return (k <= ORDER / 2) ? k : ORDER - k;
  endfunction

  assign in_ready = !q_pend;
  assign accept   = in_valid && !q_pend;
  assign x        = q_pend ? q_hold : in_data.re;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NCOEF; i++) h[i] <= '0;
    end else if (coef_we) begin
      for (int i = 0; i < NCOEF; i++)
        if (int'(coef_idx) == i) h[i] <= coef_data;
    end
  end

  // Stage 1: the 101 shared products of the current I or Q value.
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      q_pend  <= 1'b0;
      q_hold  <= '0;
      p_valid <= 1'b0;
      p_is_q  <= 1'b0;
      for (int i = 0; i < NCOEF; i++) p[i] <= '0;
    end else begin
      q_pend  <= accept;
      p_valid <= accept || q_pend;
      p_is_q  <= q_pend;
      if (accept) q_hold <= in_data.im;
      if (accept || q_pend) begin
        for (int i = 0; i < NCOEF; i++) p[i] <= x * h[i];
      end
    end
  end

  // Stage 2: transposed adder chain of the rail whose turn it is,
  // s[k] <= h[k]*x + s[k+1]; the sample is output with its Q result.
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      re_hold   <= '0;
      for (int k = 1; k <= ORDER; k++) begin
        s_re[k] <= '0;
        s_im[k] <= '0;
      end
    end else begin
      out_valid <= p_valid && p_is_q;
      if (p_valid && !p_is_q) begin
        for (int k = 1; k < ORDER; k++) s_re[k] <= AW'(p[cidx(k)]) + s_re[k+1];
        s_re[ORDER] <= AW'(p[cidx(ORDER)]);
        re_hold     <= round_sat(64'(AW'(p[0]) + s_re[1]), CFRAC);
      end
      if (p_valid && p_is_q) begin
        for (int k = 1; k < ORDER; k++) s_im[k] <= AW'(p[cidx(k)]) + s_im[k+1];
        s_im[ORDER] <= AW'(p[cidx(ORDER)]);
        out_data.re <= re_hold;
        out_data.im <= round_sat(64'(AW'(p[0]) + s_im[1]), CFRAC);
      end
    end
  end

endmodule
