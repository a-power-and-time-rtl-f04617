// Testbench for reconfig_ctrl: loads bitstreams of several lengths from a
// DMA model with random gaps. Checks that every word reaches the
// configuration port once and in order, that decouple is high from the
// request until one cycle after the mode changes, that the mode changes
// only after the last word, one done pulse per load, and that a request
// while busy is ignored.
module tb_reconfig_ctrl;
  import ldacs_pkg::*;

  logic clk = 1'b0, rst = 1'b1, req = 1'b0;
  prr_mode_e req_mode = MODE_BYPASS;
  logic [23:0] req_words = '0;
  logic bs_valid = 1'b0, bs_ready;
  logic [31:0] bs_data = '0;
  logic icap_csib, icap_rdwrb, decouple, busy, done;
  logic [31:0] icap_i;
  prr_mode_e mode;

  int checks = 0, failures = 0, icap_words = 0, sent = 0;

  reconfig_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && !icap_csib) begin
      checks++;
      if (icap_rdwrb || icap_i != 32'hC0DE0000 + 32'(icap_words)) begin
        failures++;
        $display("FAIL icap word %h expected %h", icap_i, 32'hC0DE0000 + 32'(icap_words));
      end
      icap_words++;
    end
  end

  task automatic load(input prr_mode_e m, input int words);
    prr_mode_e old;
    int dones;
    old = mode;
    dones = 0;
    icap_words = 0;
    sent = 0;
    req <= 1'b1; req_mode <= m; req_words <= 24'(words);
    @(posedge clk);
    req <= 1'b0;
    while (!done) begin
      bs_valid <= (sent < words) && ($urandom_range(0, 2) != 0);
      bs_data  <= 32'hC0DE0000 + 32'(sent);
      // a second request in the middle must be ignored
      req      <= (words >= 4) && (sent == words / 2);
      req_mode <= MODE_BYPASS;
      @(posedge clk);
      if (bs_valid && bs_ready) sent++;
      #1;
      checks++;
      if (!decouple || (!done && mode != old)) begin
        failures++;
        $display("FAIL decouple %0b mode %0d during load", decouple, mode);
      end
      if (done) dones++;
    end
    req <= 1'b0;
    bs_valid <= 1'b0;
    // cycle of the done pulse: new mode, still decoupled
    checks++;
    if (mode != m || !decouple || busy) begin
      failures++;
      $display("FAIL after load: mode %0d decouple %0b", mode, decouple);
    end
    @(posedge clk);
    #1;
    checks++;
    if (decouple || icap_words != words || sent != words || dones != 1) begin
      failures++;
      $display("FAIL end: decouple %0b words %0d/%0d", decouple, icap_words, words);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    checks++;
    if (mode != MODE_BYPASS || decouple) begin failures++; $display("FAIL reset state"); end
    load(MODE_FFB, 37);
    load(MODE_CF, 120);
    load(MODE_BYPASS, 1);
    load(MODE_CF, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
