// End-to-end sequence for ldacs_radio_top, shared by the reduced-size and
// the full-size testbench. The including module declares N_SAMPLES,
// BANK_DEPTH, FIFO_DEPTH and RX_GAP (cycles per received sample) and
// instantiates the top as dut with the signals declared here.
//
// What a processor would do, through the register bus:
//   1. load the filter-bank and channel-filter coefficients;
//   2. load the filter bank into the reconfigurable region (bitstream from
//      a DMA model) and, without waiting for the load to finish, scan the
//      23 channels, so reception overlaps the load; an RF model answers every
//      retune and sends tones in a chosen set of channels; the occupied
//      flags must match that set exactly;
//   3. load the channel filter and send a transmit burst against a slow RF
//      side; every output must match a direct convolution;
//   4. load the bypass and stream received samples to the DMA output.
// Each mechanism is counted and must happen: module loads of each kind,
// retunes, double-buffer bank hand-overs while the other bank fills,
// transmit FIFO back-pressure, bypass transfers, samples received while
// the filter bank is still loading, and the scan itself.

  logic clk = 1'b0, rst = 1'b1;
  logic cfg_we = 1'b0;
  logic [11:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata;
  logic irq;
  logic rf_rx_valid = 1'b0, rf_tx_valid, rf_tx_ready = 1'b0;
  cplx_t rf_rx_data = '0, rf_tx_data;
  logic tune_req, tune_ack = 1'b0;
  logic [2:0] tune_group;
  logic dma_tx_valid = 1'b0, dma_tx_ready, dma_rx_valid, dma_rx_ready = 1'b0;
  cplx_t dma_tx_data = '0, dma_rx_data;
  logic dma_bs_valid = 1'b0, dma_bs_ready;
  logic [31:0] dma_bs_data = '0;
  logic icap_csib, icap_rdwrb;
  logic [31:0] icap_i;

  int checks = 0, failures = 0;
  int n_load [3];
  int n_acq_load = 0, n_retune = 0, n_overlap = 0, n_stall = 0, n_bypass = 0, n_scan = 0, n_icap = 0;
  logic [N_CHAN-1:0] pattern;
  int cur_group = -1;
  logic rx_run = 1'b0, rx_ramp = 1'b0;
  int rx_t = 0;
  int h [201];
  int hist_re [$], hist_im [$];
  int exp_re [$], exp_im [$];
  int byp_next = 0;
  longint t_start, t_scan;

  always #2 clk = ~clk;

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    #1;
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = d;
    @(posedge clk);
    #1;
    cfg_we = 1'b0;
  endtask

  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(posedge clk);
    #1;
    cfg_addr = a;
    #1;
    d = cfg_rdata;
  endtask

  // DMA model for bitstreams: always has the next word.
  always @(posedge clk) begin
    dma_bs_valid <= ($urandom_range(0, 3) != 0);
    dma_bs_data  <= $urandom;
    if (!icap_csib) n_icap++;
  end

  task automatic load_module(input prr_mode_e m, input int words);
    logic [31:0] st;
    int before_n;
    before_n = n_icap;
    wr(REG_BS_WORDS, 32'(words));
    wr(REG_MODE_REQ, 32'(m));
    while (!irq) @(posedge clk);
    repeat (3) @(posedge clk);
    rd(REG_STATUS, st);
    checks++;
    if (st[1:0] != 2'(m) || st[2] || n_icap - before_n != words) begin
      failures++;
      $display("FAIL load of %0d: status %h, %0d words", m, st, n_icap - before_n);
    end
    n_load[m]++;
  endtask

  // RF model: retune acknowledge and the received signal. Channel 4g+b
  // of group g sits at band b: -1, 0, +1, +2 MHz -> 500 kHz index 6, 0, 2, 4.
  always @(posedge clk) begin
    if (!rst && tune_req && !tune_ack && $urandom_range(0, 3) == 0) begin
      tune_ack  <= 1'b1;
      cur_group <= int'(tune_group);
      n_retune++;
    end else begin
      tune_ack <= 1'b0;
    end
  end

  initial begin
    forever begin
      real sr, si;
      int  kk [4];
      kk = '{6, 0, 2, 4};
      repeat (RX_GAP - 1) @(posedge clk);
      sr = real'($urandom_range(0, 200)) - 100.0;
      si = real'($urandom_range(0, 200)) - 100.0;
      for (int b = 0; b < 4; b++) begin
        int c;
        c = cur_group * 4 + b;
        if (cur_group >= 0 && c < N_CHAN && pattern[c]) begin
          sr += 3000.0 * $cos(PI * kk[b] * rx_t / 4.0 + b);
          si += 3000.0 * $sin(PI * kk[b] * rx_t / 4.0 + b);
        end
      end
      rf_rx_valid <= rx_run;
      rf_rx_data.re <= rx_ramp ? 16'(rx_t) : 16'(int'($floor(sr)));
      rf_rx_data.im <= rx_ramp ? ~16'(rx_t) : 16'(int'($floor(si)));
      @(posedge clk);
      if (rx_run) rx_t++;
      rf_rx_valid <= 1'b0;
    end
  end

  // monitors
  always @(posedge clk) begin
    if (!rst) begin
      if (dut.u_rxbuf.out_valid && dut.u_rxbuf.out_ready && dut.u_rxbuf.widx != '0) n_overlap++;
      if (dma_tx_valid && !dma_tx_ready && dut.mode == MODE_CF && !dut.decouple) n_stall++;
      if (dut.u_sense.done) n_scan++;
      if (dut.decouple && dut.u_sense.busy && rf_rx_valid) n_acq_load++;
      if (rf_tx_valid && rf_tx_ready) begin
        int er, ei;
        checks++;
        er = exp_re.pop_front();
        ei = exp_im.pop_front();
        if (int'(rf_tx_data.re) != er || int'(rf_tx_data.im) != ei) begin
          failures++;
          $display("FAIL tx %0d,%0d expected %0d,%0d", rf_tx_data.re, rf_tx_data.im, er, ei);
        end
      end
      if (dma_rx_valid && dma_rx_ready && dut.mode == MODE_BYPASS && rx_ramp) begin
        checks++;
        if (int'(dma_rx_data.re) != (byp_next & 16'hffff) && n_bypass == 0) byp_next = int'(dma_rx_data.re);
        if (dma_rx_data.re != 16'(byp_next) || dma_rx_data.im != ~16'(byp_next)) begin
          failures++;
          $display("FAIL bypass %0d expected %0d", dma_rx_data.re, byp_next);
        end
        byp_next++;
        n_bypass++;
      end
    end
  end

  initial begin
    int re, im;
    logic [31:0] d, occ;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);

    // 1. coefficients
    for (int f = 0; f < 7; f++)
      for (int n = 0; n <= (node_taps(f) - 1) / 2; n++) begin
        node_coef(f, n, re, im);
        wr(REG_FFB_RE + 12'(64 * f + n), 32'(re));
        wr(REG_FFB_IM + 12'(64 * f + n), 32'(im));
      end
    for (int i = 0; i <= 100; i++) begin
      h[i] = to_q17(cf_tap(i, 0.075));
      h[200-i] = h[i];
      wr(REG_CF_COEF + 12'(i), 32'(h[i]));
    end

    // 2. spectrum scan
    // The filter bank is loaded while the first group is already being
    // received: the bitstream takes about a third of a buffer bank's worth
    // of sample periods, and the samples wait in the receive buffer.
    pattern = N_CHAN'(32'h0052_9A63 ^ $urandom);
    wr(REG_THRESH_LO, 32'h0);
    wr(REG_THRESH_HI, 32'((64'(N_SAMPLES) * 1000000) >> 32));
    wr(REG_THRESH_LO, 32'(64'(N_SAMPLES) * 1000000));
    begin
      int before_n;
      before_n = n_icap;
      wr(REG_BS_WORDS, 32'(BANK_DEPTH * RX_GAP / 4));
      wr(REG_MODE_REQ, 32'(MODE_FFB));
      rx_run = 1'b1;
      wr(REG_SENSE, 32'h1);
      t_start = $time;
      while (!irq) @(posedge clk);
      @(posedge clk);
      #1;
      cfg_addr = REG_STATUS;
      #1;
      checks++;
      if (cfg_rdata[1:0] != 2'(MODE_FFB) || cfg_rdata[2] || !cfg_rdata[3] ||
          n_icap - before_n != BANK_DEPTH * RX_GAP / 4) begin
        failures++;
        $display("FAIL overlapped load: status %h, %0d words", cfg_rdata, n_icap - before_n);
      end
      n_load[MODE_FFB]++;
    end
    while (!irq) @(posedge clk);
    t_scan = ($time - t_start) / 4;        // clock period is 4 time units
    rx_run = 1'b0;
    // a scan needs N_SAMPLES received samples per group, plus at most two
    // banks of buffering and the retune; at 4 MHz 6 x 20000 samples = 30 ms
    checks++;
    if (t_scan < longint'(N_GROUPS * N_SAMPLES * RX_GAP) ||
        t_scan > longint'(N_GROUPS * (N_SAMPLES + 2 * BANK_DEPTH + 50) * RX_GAP)) begin
      failures++;
      $display("FAIL scan took %0d cycles", t_scan);
    end
    $display("scan: %0d cycles = %0d sample periods = %f ms at 4 MHz",
             t_scan, t_scan / RX_GAP, real'(t_scan) / RX_GAP / 4000.0);
    repeat (2) @(posedge clk);
    rd(REG_OCCUPIED, occ);
    checks++;
    if (N_CHAN'(occ) != pattern) begin
      failures++;
      $display("FAIL occupied %h expected %h", occ, pattern);
    end
    for (int c = 0; c < N_CHAN; c++) begin
      logic [31:0] lo, hi;
      rd(REG_ENERGY + 12'(2 * c), lo);
      rd(REG_ENERGY + 12'(2 * c + 1), hi);
      if (c < 4) $display("channel %0d energy %0d", c, {hi[15:0], lo});
    end
    rd(REG_STATUS, d);
    checks++;
    if (!d[4] || d[3] || d[5]) begin failures++; $display("FAIL scan status %h", d); end

    // 3. transmit through the channel filter
    load_module(MODE_CF, 96);
    for (int t = 0; t < 3 * FIFO_DEPTH + 300;) begin
      dma_tx_valid <= 1'b1;
      dma_tx_data.re <= 16'($urandom_range(0, 20000) - 10000);
      dma_tx_data.im <= 16'($urandom_range(0, 20000) - 10000);
      rf_tx_ready <= ($urandom_range(0, 7) == 0);
      @(posedge clk);
      if (dma_tx_valid && dma_tx_ready) begin
        longint ar, ai;
        hist_re.push_front(int'(dma_tx_data.re));
        hist_im.push_front(int'(dma_tx_data.im));
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
    dma_tx_valid <= 1'b0;
    rf_tx_ready <= 1'b1;
    repeat (3 * FIFO_DEPTH + 10) @(posedge clk);
    checks++;
    if (exp_re.size() != 0) begin failures++; $display("FAIL %0d tx samples missing", exp_re.size()); end

    // 4. back to receive through the bypass
    load_module(MODE_BYPASS, 8);
    rx_ramp = 1'b1;
    rx_run = 1'b1;
    dma_rx_ready <= 1'b1;
    repeat ((3 * BANK_DEPTH + 8) * RX_GAP) @(posedge clk);
    rx_run = 1'b0;

    // every mechanism must have happened
    checks++;
    if (n_load[MODE_FFB] == 0 || n_load[MODE_CF] == 0 || n_load[MODE_BYPASS] == 0 ||
        n_retune != N_GROUPS || n_overlap == 0 || n_stall == 0 ||
        n_bypass < 2 * BANK_DEPTH || n_scan != 1 || n_acq_load == 0) begin
      failures++;
    end
    $display("loads ffb %0d cf %0d bypass %0d, retunes %0d, overlapped reads %0d, tx stalls %0d, bypass %0d, scans %0d, samples received during load %0d",
             n_load[MODE_FFB], n_load[MODE_CF], n_load[MODE_BYPASS], n_retune, n_overlap,
             n_stall, n_bypass, n_scan, n_acq_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
