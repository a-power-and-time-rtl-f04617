// Testbench for energy_detector: random samples with random gaps; the
// reported energy must equal the sum of I^2 + Q^2 over exactly N_SAMPLES
// samples after start, done must pulse once, the cycle after the last
// sample, and samples outside the window must not count.
module tb_energy_detector;
  import ldacs_pkg::*;

  localparam int N = 50;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0, in_valid = 1'b0;
  cplx_t in_data = '0;
  logic busy, done;
  logic [EW-1:0] energy;

  int checks = 0, failures = 0;

  energy_detector #(.N_SAMPLES(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int w = 0; w < 5; w++) begin
      longint expect_e;
      int taken, dones, last_cycle, done_cycle;
      expect_e = 0; taken = 0; dones = 0; last_cycle = -1; done_cycle = -1;
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      for (int t = 0; t < 4 * N; t++) begin
        logic v;
        int xr, xi;
        v  = ($urandom_range(0, 2) != 0);
        xr = (w == 4) ? -32768 : int'($urandom_range(0, 65535)) - 32768;
        xi = (w == 4) ? -32768 : int'($urandom_range(0, 65535)) - 32768;
        in_valid <= v;
        in_data.re <= 16'(xr);
        in_data.im <= 16'(xi);
        if (v && taken < N) begin
          expect_e += longint'(xr) * xr + longint'(xi) * xi;
          taken++;
          if (taken == N) last_cycle = t;
        end
        @(posedge clk);
        #1;
        if (done) begin dones++; done_cycle = t; end
      end
      in_valid <= 1'b0;
      checks++;
      if (dones != 1 || done_cycle != last_cycle) begin
        failures++;
        $display("FAIL window %0d: %0d done pulses, at %0d, expected at %0d",
                 w, dones, done_cycle, last_cycle);
      end
      checks++;
      if (energy != EW'(expect_e)) begin
        failures++;
        $display("FAIL window %0d: energy %0d expected %0d", w, energy, expect_e);
      end
      checks++;
      if (busy) begin failures++; $display("FAIL still busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
