// Testbench for rx_double_buffer: samples arrive at one in four cycles
// (the slow sample rate) and the reader drains bursts with a random ready.
// Checks that every sample comes out once and in order, that output is
// only offered from a full bank (bursts of BANK_DEPTH), that the two banks
// alternate while one fills (overlap), that a blocked reader leads to the
// overflow flag, and that flush empties the buffer.
module tb_rx_double_buffer;
  import ldacs_pkg::*;

  localparam int BD = 16;

  logic clk = 1'b0, rst = 1'b1, flush = 1'b0, in_valid = 1'b0, out_ready = 1'b0;
  cplx_t in_data = '0, out_data;
  logic out_valid, overflow;

  int checks = 0, failures = 0, overlaps = 0, bursts = 0;
  int sent = 0, got = 0, run = 0;
  logic block_reader = 1'b0;

  rx_double_buffer #(.BANK_DEPTH(BD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader side: check order, burst length
  always @(posedge clk) begin
    if (!rst && !flush && out_valid && out_ready) begin
      checks++;
      if (int'(out_data.re) != (got & 16'h7fff) || int'(out_data.im) != -(got & 16'h7fff)) begin
        failures++;
        $display("FAIL got %0d,%0d expected sample %0d", out_data.re, out_data.im, got);
      end
      got++;
      run++;
      if (run == BD) begin bursts++; run = 0; end
      // reading one bank while the other is being written
      if (dut.widx != '0) overlaps++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 4 * BD * 20; t++) begin
      in_valid   <= (t % 4 == 0);
      in_data.re <= 16'(sent & 16'h7fff);
      in_data.im <= 16'(-(sent & 16'h7fff));
      out_ready  <= ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (t % 4 == 0) sent++;
      #1;
      if (out_valid) begin
        checks++;
        if (!dut.full[dut.rbank]) begin failures++; $display("FAIL offered a bank not full"); end
      end
    end
    in_valid <= 1'b0;
    out_ready <= 1'b1;
    repeat (3 * BD) @(posedge clk);
    checks++;
    if (got != (sent / BD) * BD || overflow) begin
      failures++;
      $display("FAIL %0d samples out of %0d sent, overflow %0b", got, sent, overflow);
    end
    checks++;
    if (bursts == 0 || overlaps == 0) begin
      failures++;
      $display("FAIL bursts %0d overlaps %0d", bursts, overlaps);
    end
    // blocked reader: both banks fill, the next sample overflows
    out_ready <= 1'b0;
    for (int t = 0; t < 2 * BD + 1; t++) begin
      in_valid <= 1'b1;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    @(posedge clk);
    checks++;
    if (!overflow) begin failures++; $display("FAIL no overflow"); end
    flush <= 1'b1;
    @(posedge clk);
    flush <= 1'b0;
    #1;
    checks++;
    if (overflow || out_valid) begin failures++; $display("FAIL flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
