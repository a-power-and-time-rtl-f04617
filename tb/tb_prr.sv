// Testbench for prr: takes the region through its three modules.
//   bypass: a random stream with random backpressure must come out whole
//           and in order;
//   filter bank: a tone at +1 MHz must give band 2 (of -1, 0, +1, +2 MHz)
//           nearly all the energy after the detectors' window;
//   channel filter: random samples through the transmit FIFO, filter and
//           output FIFO with a slow, stalling RF side must match a direct
//           convolution, and the stalls must reach the input (in_ready low).
// Also checks that decouple clears the region and holds back the received
// stream, and that ffb_live is high only for the live filter bank.
module tb_prr;
  import ldacs_pkg::*;
  import tb_util_pkg::*;

  localparam int N = 1024, FD = 16;

  logic clk = 1'b0, rst = 1'b1, decouple = 1'b0;
  prr_mode_e mode = MODE_BYPASS;
  logic rx_valid = 1'b0, rx_ready, up_valid, up_ready = 1'b0;
  cplx_t rx_data = '0, up_data;
  logic tx_in_valid = 1'b0, tx_in_ready, rf_tx_valid, rf_tx_ready = 1'b0;
  cplx_t tx_in_data = '0, rf_tx_data;
  logic ffb_coef_we = 1'b0;
  logic [2:0] ffb_coef_filt = '0;
  logic [5:0] ffb_coef_idx = '0;
  logic signed [CW-1:0] ffb_coef_re = '0, ffb_coef_im = '0;
  logic cf_coef_we = 1'b0;
  logic [6:0] cf_coef_idx = '0;
  logic signed [CW-1:0] cf_coef_data = '0;
  logic ffb_clear = 1'b0, ed_start = 1'b0, ffb_live;
  logic [3:0] ed_done;
  logic [EW-1:0] ed_energy [BANDS];

  int checks = 0, failures = 0, stalls = 0;
  int h [201];
  int hist_re [$], hist_im [$];
  int exp_re [$], exp_im [$];
  int byp_q [$];

  prr #(.N_SAMPLES(N), .FIFO_DEPTH(FD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitors
  always @(posedge clk) begin
    if (!rst && up_valid && up_ready) begin
      int e;
      checks++;
      e = byp_q.pop_front();
      if (int'(up_data.re) != e || int'(up_data.im) != ~e) begin
        failures++;
        $display("FAIL bypass %0d expected %0d", up_data.re, e);
      end
    end
    if (!rst && rf_tx_valid && rf_tx_ready && mode == MODE_CF) begin
      int er, ei;
      checks++;
      er = exp_re.pop_front();
      ei = exp_im.pop_front();
      if (int'(rf_tx_data.re) != er || int'(rf_tx_data.im) != ei) begin
        failures++;
        $display("FAIL tx %0d,%0d expected %0d,%0d", rf_tx_data.re, rf_tx_data.im, er, ei);
      end
    end
    if (!rst && tx_in_valid && !tx_in_ready && mode == MODE_CF && !decouple) stalls++;
  end

  initial begin
    int re, im, t;
    real best_other;
    repeat (3) @(posedge clk);
    rst <= 1'b0;

    // ---- bypass ----
    t = 0;
    while (t < 300) begin
      rx_valid <= ($urandom_range(0, 1) != 0);
      rx_data.re <= 16'(t);
      rx_data.im <= ~16'(t);
      up_ready <= ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (rx_valid && rx_ready) begin byp_q.push_back(t); t++; end
    end
    rx_valid <= 1'b0;
    up_ready <= 1'b1;
    repeat (5) @(posedge clk);
    checks++;
    if (byp_q.size() != 0) begin failures++; $display("FAIL bypass lost %0d", byp_q.size()); end

    // ---- filter bank and detectors ----
    for (int f = 0; f < 7; f++)
      for (int n = 0; n <= (node_taps(f) - 1) / 2; n++) begin
        node_coef(f, n, re, im);
        ffb_coef_we <= 1'b1; ffb_coef_filt <= 3'(f); ffb_coef_idx <= 6'(n);
        ffb_coef_re <= CW'(re); ffb_coef_im <= CW'(im);
        @(posedge clk);
      end
    ffb_coef_we <= 1'b0;
    decouple <= 1'b1;
    mode <= MODE_FFB;
    @(posedge clk);
    decouple <= 1'b0;
    ffb_clear <= 1'b1;
    @(posedge clk);
    ffb_clear <= 1'b0;
    ed_start <= 1'b1;
    @(posedge clk);
    ed_start <= 1'b0;
    checks++;
    if (!ffb_live) begin failures++; $display("FAIL filter bank not live"); end
    t = 0;
    while (ed_done == 4'h0 && t < 4 * N) begin
      rx_valid   <= 1'b1;
      rx_data.re <= 16'(int'($floor(6000.0 * $cos(PI * t / 2.0) + 0.5)));
      rx_data.im <= 16'(int'($floor(6000.0 * $sin(PI * t / 2.0) + 0.5)));
      t++;
      @(posedge clk);
    end
    rx_valid <= 1'b0;
    checks++;
    if (ed_done != 4'hf) begin failures++; $display("FAIL detectors done %b", ed_done); end
    best_other = 0.0;
    for (int b = 0; b < BANDS; b++)
      if (b != 2 && real'(ed_energy[b]) > best_other) best_other = real'(ed_energy[b]);
    $display("band energies %0d %0d %0d %0d", ed_energy[0], ed_energy[1], ed_energy[2], ed_energy[3]);
    checks++;
    if (real'(ed_energy[2]) < 100.0 * best_other ||
        real'(ed_energy[2]) < 0.7 * 36.0e6 * N || real'(ed_energy[2]) > 1.1 * 36.0e6 * N) begin
      failures++;
      $display("FAIL tone energy");
    end

    // ---- channel filter ----
    for (int i = 0; i <= 100; i++) begin
      h[i] = int'($urandom_range(0, 8191)) - 4096;
      h[200-i] = h[i];
      cf_coef_we <= 1'b1; cf_coef_idx <= 7'(i); cf_coef_data <= CW'(h[i]);
      @(posedge clk);
    end
    cf_coef_we <= 1'b0;
    decouple <= 1'b1;
    mode <= MODE_CF;
    @(posedge clk);
    decouple <= 1'b0;
    t = 0;
    while (t < 400) begin
      tx_in_valid <= ($urandom_range(0, 3) != 0);
      tx_in_data.re <= 16'($urandom);
      tx_in_data.im <= 16'($urandom);
      rf_tx_ready <= (t > 100 && t < 300) ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 1) != 0);
      @(posedge clk);
      if (tx_in_valid && tx_in_ready) begin
        longint ar, ai;
        hist_re.push_front(int'(tx_in_data.re));
        hist_im.push_front(int'(tx_in_data.im));
        ar = 0; ai = 0;
        for (int k = 0; k < 201 && k < hist_re.size(); k++) begin
          ar += longint'(hist_re[k]) * h[k];
          ai += longint'(hist_im[k]) * h[k];
        end
        exp_re.push_back(rnd_sat(ar));
        exp_im.push_back(rnd_sat(ai));
        t++;
      end
    end
    tx_in_valid <= 1'b0;
    rf_tx_ready <= 1'b1;
    repeat (2 * FD + 10) @(posedge clk);
    checks++;
    if (exp_re.size() != 0 || stalls == 0) begin
      failures++;
      $display("FAIL tx left %0d, stalls %0d", exp_re.size(), stalls);
    end

    // ---- decouple clears the region ----
    tx_in_valid <= 1'b1;
    rf_tx_ready <= 1'b0;
    repeat (5) @(posedge clk);
    tx_in_valid <= 1'b0;
    decouple <= 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (rx_ready || ffb_live) begin failures++; $display("FAIL rx_ready/ffb_live while decoupled"); end
    decouple <= 1'b0;
    #1;
    checks++;
    if (rf_tx_valid || dut.u_tx_fifo.count != 0) begin failures++; $display("FAIL decouple"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
