// Testbench for stream_fifo: random pushes and pops against a queue model;
// checks data order, count, and that in_ready falls exactly when full and
// out_valid exactly when empty.
module tb_stream_fifo;
  localparam int W = 32, DEPTH = 8;

  logic clk = 1'b0, rst = 1'b1, clear = 1'b0;
  logic in_valid = 1'b0, out_ready = 1'b0;
  logic in_ready, out_valid;
  logic [W-1:0] in_data = '0, out_data;
  logic [$clog2(DEPTH):0] count;

  int checks = 0, failures = 0, fulls = 0, empties = 0;
  logic [W-1:0] q [$];

  stream_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

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
    for (int t = 0; t < 3000; t++) begin
      int bias;
      bias = (t / 300) % 2;     // alternate filling and draining phases
      in_valid  <= ($urandom_range(0, 3) < (bias ? 3 : 1));
      out_ready <= ($urandom_range(0, 3) < (bias ? 1 : 3));
      in_data   <= $urandom;
      #1;
      checks++;
      if (int'(count) != q.size() || in_ready != (q.size() < DEPTH) ||
          out_valid != (q.size() > 0) || (q.size() > 0 && out_data != q[0])) begin
        failures++;
        $display("FAIL t=%0d count %0d model %0d", t, count, q.size());
      end
      if (q.size() == DEPTH) fulls++;
      if (q.size() == 0) empties++;
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++;
    if (fulls == 0 || empties == 0) begin
      failures++;
      $display("FAIL never full (%0d) or never empty (%0d)", fulls, empties);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
