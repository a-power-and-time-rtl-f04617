// Testbench for ffb: loads half-band prototypes with the node frequency
// shifts, then drives a complex tone at the centre of each of the 8 bands
// (k * 500 kHz at 4 MHz) and measures the power of every subband output.
// The band the tone sits in must hold nearly all of it (at least 20 dB
// above every other subband) and pass it at about unit gain. Also checks
// the 3-cycle latency of out_valid.
module tb_ffb;
  import ldacs_pkg::*;
  import tb_util_pkg::*;

  logic clk = 1'b0, rst = 1'b1, clear = 1'b0;
  logic coef_we = 1'b0;
  logic [2:0] coef_filt = '0;
  logic [5:0] coef_idx = '0;
  logic signed [CW-1:0] coef_re = '0, coef_im = '0;
  logic in_valid = 1'b0;
  cplx_t in_data = '0;
  logic out_valid;
  cplx_t subband [8];

  int checks = 0, failures = 0;
  real pwr [8];

  ffb dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (out_valid)
      for (int k = 0; k < 8; k++)
        pwr[k] += real'(subband[k].re) ** 2 + real'(subband[k].im) ** 2;
  end

  initial begin
    int re, im, lat;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < 7; f++) begin
      for (int n = 0; n <= (node_taps(f) - 1) / 2; n++) begin
        node_coef(f, n, re, im);
        coef_we <= 1'b1; coef_filt <= 3'(f); coef_idx <= 6'(n);
        coef_re <= CW'(re); coef_im <= CW'(im);
        @(posedge clk);
      end
    end
    coef_we <= 1'b0;

    // latency: a single valid sample appears 3 cycles later
    in_valid <= 1'b1;
    @(posedge clk);
    in_valid <= 1'b0;
    #1;
    lat = 1;   // cycles after the one the sample was presented in
    while (!out_valid && lat < 10) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end

    for (int k = 0; k < 8; k++) begin
      real tot, best_other;
      clear <= 1'b1;
      @(posedge clk);
      clear <= 1'b0;
      // settle 300 samples, then measure 512
      for (int t = 0; t < 812; t++) begin
        if (t == 301) for (int b = 0; b < 8; b++) pwr[b] = 0.0;
        in_valid   <= 1'b1;
        in_data.re <= 16'(int'($floor(8000.0 * $cos(PI * k * t / 4.0) + 0.5)));
        in_data.im <= 16'(int'($floor(8000.0 * $sin(PI * k * t / 4.0) + 0.5)));
        @(posedge clk);
      end
      in_valid <= 1'b0;
      repeat (4) @(posedge clk);
      best_other = 0.0;
      for (int b = 0; b < 8; b++) if (b != k && pwr[b] > best_other) best_other = pwr[b];
      tot = 8000.0 * 8000.0 * 512.0;
      checks++;
      if (pwr[k] < 100.0 * best_other) begin
        failures++;
        $display("FAIL tone %0d: own %e, strongest other %e", k, pwr[k], best_other);
      end
      checks++;
      if (pwr[k] < 0.8 * tot || pwr[k] > 1.2 * tot) begin
        failures++;
        $display("FAIL tone %0d: gain %f", k, pwr[k] / tot);
      end
      $display("tone %0d: gain %f, rejection %f dB", k, pwr[k] / tot,
               10.0 * $log10(pwr[k] / (best_other + 1.0)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
