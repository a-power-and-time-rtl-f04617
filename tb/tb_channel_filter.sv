// Testbench for channel_filter at its full order (200): random symmetric
// coefficients and random samples with gaps, against a direct convolution
// over all 201 taps; then the impulse response, which must reproduce the
// loaded coefficients h[0..200] = h[200..0]. Checks the 3-cycle latency
// and that a sample is accepted at most every second cycle.
module tb_channel_filter;
  import ldacs_pkg::*;
  import tb_util_pkg::*;

  localparam int ORDER = 200;

  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, coef_we = 1'b0;
  logic [6:0] coef_idx = '0;
  logic signed [CW-1:0] coef_data = '0;
  logic in_valid = 1'b0, in_ready;
  cplx_t in_data = '0;
  logic out_valid;
  cplx_t out_data;

  int checks = 0, failures = 0;
  int h [ORDER+1];
  int xr_h [$], xi_h [$];
  int exp_q_re [$], exp_q_im [$];
  logic vpipe [3];

  channel_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_coefs(input bit impulse_test);
    for (int i = 0; i <= ORDER / 2; i++) begin
      int c;
      c = impulse_test ? (i + 1) * 1000 : int'($urandom_range(0, 16383)) - 8192;
      h[i] = c;
      h[ORDER-i] = c;
      coef_we <= 1'b1; coef_idx <= 7'(i); coef_data <= CW'(c);
      @(posedge clk);
    end
    coef_we <= 1'b0;
  endtask

  // Expected output for the newest sample.
  task automatic push_expected();
    longint ar = 0, ai = 0;
    for (int k = 0; k <= ORDER; k++) begin
      if (k < xr_h.size()) begin
        ar += longint'(xr_h[k]) * h[k];
        ai += longint'(xi_h[k]) * h[k];
      end
    end
    exp_q_re.push_back(rnd_sat(ar));
    exp_q_im.push_back(rnd_sat(ai));
  endtask

  always @(posedge clk) begin
    vpipe[0] <= in_valid && in_ready;
    vpipe[1] <= vpipe[0];
    vpipe[2] <= vpipe[1];
    if (!rst && in_valid && in_ready && vpipe[0]) begin
      checks++; failures++;
      $display("FAIL samples accepted in adjacent cycles");
    end
  end

  // Present one sample and hold it until it is accepted.
  task automatic send(input int xr, input int xi);
    #1;
    in_valid   = 1'b1;
    in_data.re = 16'(xr);
    in_data.im = 16'(xi);
    do @(negedge clk); while (!in_ready);
    @(posedge clk);
    #1;
    in_valid = 1'b0;
  endtask

  // Compare every output with the oldest expected one; check latency.
  always @(posedge clk) begin
    if (!rst) begin
      if (out_valid !== vpipe[2]) begin
        checks++; failures++;
        $display("FAIL out_valid %0b, expected %0b", out_valid, vpipe[2]);
      end
      if (out_valid) begin
        int er, ei;
        checks++;
        er = exp_q_re.pop_front();
        ei = exp_q_im.pop_front();
        if (int'(out_data.re) != er || int'(out_data.im) != ei) begin
          failures++;
          $display("FAIL out %0d,%0d expected %0d,%0d", out_data.re, out_data.im, er, ei);
        end
      end
    end
  end

  initial begin
    vpipe[0] = 1'b0; vpipe[1] = 1'b0; vpipe[2] = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    load_coefs(1'b0);
    for (int t = 0; t < 700; t++) begin
      logic v;
      int xr, xi;
      v  = ($urandom_range(0, 4) != 0);
      xr = int'($urandom_range(0, 65535)) - 32768;
      xi = int'($urandom_range(0, 65535)) - 32768;
      if (v) begin
        xr_h.push_front(xr);
        xi_h.push_front(xi);
        if (xr_h.size() > ORDER + 1) begin void'(xr_h.pop_back()); void'(xi_h.pop_back()); end
        push_expected();
        send(xr, xi);
      end else begin
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    // impulse response after a flush
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    xr_h.delete(); xi_h.delete();
    load_coefs(1'b1);
    for (int t = 0; t <= ORDER + 5; t++) begin
      int xr;
      xr = (t == 0) ? 16384 : 0;      // 0.125 in Q1.17 scaling gives h/8
      xr_h.push_front(xr);
      xi_h.push_front(-xr);
      if (xr_h.size() > ORDER + 1) begin void'(xr_h.pop_back()); void'(xi_h.pop_back()); end
      push_expected();
      // independent form: the impulse response is h[t] * 16384 / 2^17
      checks++;
      if (t <= ORDER && exp_q_re[$] != rnd_sat(longint'(h[t]) * 16384)) begin
        failures++;
        $display("FAIL reference at %0d", t);
      end
      send(xr, -xr);
    end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
