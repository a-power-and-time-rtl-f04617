// End-to-end testbench of ldacs_radio_top at reduced sizes: a 1024-sample
// sensing window, 64-sample receive banks and 16-word transmit FIFOs. The
// sequence is in tb_radio_seq.svh.
module tb_ldacs_radio_top;
  import ldacs_pkg::*;
  import tb_util_pkg::*;

  localparam int N_SAMPLES  = 1024;
  localparam int BANK_DEPTH = 64;
  localparam int FIFO_DEPTH = 16;
  localparam int RX_GAP     = 3;

  `include "tb_radio_seq.svh"

  ldacs_radio_top #(
    .N_SAMPLES(N_SAMPLES), .BANK_DEPTH(BANK_DEPTH), .FIFO_DEPTH(FIFO_DEPTH)
  ) dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
