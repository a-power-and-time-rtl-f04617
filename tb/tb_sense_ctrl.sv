// Testbench for sense_ctrl: an RF model acknowledges each retune after a
// random delay, and detector models report four energies per group after a
// random time. Checks the group sequence 0..5, that a flush comes between
// each retune and detector start, the per-channel energy table (channel 23
// of the last group dropped), the occupied flags against the threshold,
// and one done pulse per scan. meas_ok (filter bank live) is driven low at
// random, and no detector start may follow a cycle with it low; the wait
// must actually happen.
module tb_sense_ctrl;
  import ldacs_pkg::*;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [EW-1:0] threshold = '0;
  logic tune_req, tune_ack = 1'b0, flush, ed_start, busy, done;
  logic meas_ok = 1'b0, meas_ok_q = 1'b0;
  int held = 0;
  bit waiting = 1'b0;
  logic [2:0] tune_group;
  logic [3:0] ed_done = '0;
  logic [EW-1:0] ed_energy [BANDS];
  logic [EW-1:0] energy [N_CHAN];
  logic [N_CHAN-1:0] occupied;

  int checks = 0, failures = 0, tunes = 0, flushes = 0, dones = 0;
  int expect_group = 0;
  longint model_e [24];

  sense_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // RF model
  always @(posedge clk) begin
    if (!rst && tune_req && !tune_ack && $urandom_range(0, 7) == 0) begin
      tune_ack <= 1'b1;
      checks++;
      if (int'(tune_group) != expect_group) begin
        failures++;
        $display("FAIL tuned group %0d expected %0d", tune_group, expect_group);
      end
      expect_group++;
      tunes++;
    end else begin
      tune_ack <= 1'b0;
    end
    meas_ok   <= ($urandom_range(0, 2) == 0);
    meas_ok_q <= meas_ok;
    if (!rst && (flush || waiting)) begin
      waiting = !meas_ok;
      if (!meas_ok) held++;
    end
    if (!rst && flush) flushes++;
    if (!rst && done) dones++;
  end

  // detector models: each reports after its own random delay
  int ed_cnt [BANDS];
  always @(posedge clk) begin
    for (int b = 0; b < BANDS; b++) begin
      ed_done[b] <= 1'b0;
      if (rst) begin
        ed_cnt[b] <= 0;
      end else if (ed_start) begin
        ed_cnt[b] <= int'($urandom_range(3, 40));
      end else if (ed_cnt[b] == 1) begin
        ed_cnt[b]    <= 0;
        ed_done[b]   <= 1'b1;
        ed_energy[b] <= EW'(model_e[(expect_group - 1) * BANDS + b]);
      end else if (ed_cnt[b] > 1) begin
        ed_cnt[b] <= ed_cnt[b] - 1;
      end
    end
    if (!rst && ed_start) begin
      checks++;
      if (flushes != tunes) begin failures++; $display("FAIL start without flush"); end
      checks++;
      if (!meas_ok_q) begin failures++; $display("FAIL start while not live"); end
    end
  end

  initial begin
    for (int b = 0; b < BANDS; b++) ed_energy[b] = '0;
    for (int s = 0; s < 2; s++) begin
      for (int c = 0; c < 24; c++) model_e[c] = longint'($urandom_range(0, 1000000)) * 1000 + c;
      threshold <= EW'(500000000);
      expect_group = 0;
      tunes = 0; flushes = 0; dones = 0;
      repeat (3) @(posedge clk);
      rst <= 1'b0;
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      #1;
      checks++;
      if (!busy) begin failures++; $display("FAIL not busy"); end
      wait (done);
      @(posedge clk);
      #1;
      checks++;
      if (busy || tunes != N_GROUPS || dones != 1) begin
        failures++;
        $display("FAIL busy %0b tunes %0d dones %0d", busy, tunes, dones);
      end
      for (int c = 0; c < N_CHAN; c++) begin
        checks++;
        if (energy[c] != EW'(model_e[c]) || occupied[c] != (model_e[c] > 500000000)) begin
          failures++;
          $display("FAIL channel %0d energy %0d expected %0d", c, energy[c], model_e[c]);
        end
      end
      repeat (60) @(posedge clk);
    end
    checks++;
    if (held == 0) begin failures++; $display("FAIL never waited for the filter bank"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
