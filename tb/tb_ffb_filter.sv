// Testbench for ffb_filter: random complex coefficients c[0..D] (the
// filter mirrors them as c[2D-n] = conj(c[n])) and random samples, with
// gaps in the input stream, against a full-length convolution over the
// recorded input history. Checks the original and complementary outputs, the one-cycle
// latency and that clear flushes the delay line.
module tb_ffb_filter;
  import ldacs_pkg::*;
  import tb_util_pkg::*;

  localparam int TAPS = 9;
  localparam int M    = 3;
  localparam int D    = (TAPS - 1) / 2;

  logic clk = 1'b0, rst = 1'b1, clear = 1'b0;
  logic coef_we = 1'b0;
  logic [5:0] coef_idx = '0;
  logic signed [CW-1:0] coef_re = '0, coef_im = '0;
  logic in_valid = 1'b0;
  cplx_t in_data = '0;
  logic out_valid;
  cplx_t out_orig, out_comp;

  int checks = 0, failures = 0;
  int cr [TAPS], ci [TAPS];
  int hr [$], hi [$];          // input history, newest first
  int exp_or, exp_oi, exp_cr, exp_ci;
  logic exp_valid = 1'b0;

  ffb_filter #(.TAPS(TAPS), .M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compute_expected();
    longint ar = 0, ai = 0;
    int xr, xi;
    for (int n = 0; n < TAPS; n++) begin
      xr = (n * M < hr.size()) ? hr[n*M] : 0;
      xi = (n * M < hi.size()) ? hi[n*M] : 0;
      ar += longint'(xr) * cr[n] - longint'(xi) * ci[n];
      ai += longint'(xi) * cr[n] + longint'(xr) * ci[n];
    end
    exp_or = rnd_sat(ar);
    exp_oi = rnd_sat(ai);
    exp_cr = sat16(((D * M < hr.size()) ? hr[D*M] : 0) - exp_or);
    exp_ci = sat16(((D * M < hi.size()) ? hi[D*M] : 0) - exp_oi);
  endtask

  task automatic check_out();
    checks++;
    if (out_valid !== exp_valid) begin
      failures++;
      $display("FAIL valid %0b expected %0b", out_valid, exp_valid);
    end else if (exp_valid &&
                 (int'(out_orig.re) != exp_or || int'(out_orig.im) != exp_oi ||
                  int'(out_comp.re) != exp_cr || int'(out_comp.im) != exp_ci)) begin
      failures++;
      $display("FAIL orig %0d,%0d exp %0d,%0d comp %0d,%0d exp %0d,%0d",
               out_orig.re, out_orig.im, exp_or, exp_oi,
               out_comp.re, out_comp.im, exp_cr, exp_ci);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int n = 0; n <= D; n++) begin
      cr[n] = int'($urandom_range(0, 65535)) - 32768;
      ci[n] = int'($urandom_range(0, 65535)) - 32768;
      cr[2*D-n] = cr[n];
      ci[2*D-n] = (n == D) ? ci[n] : -ci[n];
      coef_we <= 1'b1; coef_idx <= 6'(n);
      coef_re <= CW'(cr[n]); coef_im <= CW'(ci[n]);
      @(posedge clk);
    end
    // writes beyond the stored half must be ignored
    coef_we <= 1'b1; coef_idx <= 6'(D + 1);
    coef_re <= CW'(12345); coef_im <= CW'(-999);
    @(posedge clk);
    coef_we <= 1'b0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int t = 0; t < 400; t++) begin
        logic v;
        int xr, xi;
        v  = ($urandom_range(0, 3) != 0);
        xr = int'($urandom_range(0, 40000)) - 20000;
        xi = int'($urandom_range(0, 40000)) - 20000;
        if (t % 97 < 3) begin xr = 32767; xi = -32768; end   // drive saturation
        in_valid <= v;
        in_data.re <= 16'(xr);
        in_data.im <= 16'(xi);
        if (v) begin
          hr.push_front(xr);
          hi.push_front(xi);
        end
        @(posedge clk);
        // the cycle after the input, the output is for that sample
        #1;
        exp_valid = v;
        if (v) compute_expected();
        check_out();
      end
      // flush and start again from an empty delay line
      in_valid <= 1'b0;
      clear <= 1'b1;
      @(posedge clk);
      clear <= 1'b0;
      hr.delete();
      hi.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
