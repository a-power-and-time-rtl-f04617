// End-to-end testbench of ldacs_radio_top with every parameter at its
// default: a 20000-sample sensing window per group of four channels (six
// groups for the 23 channels), 2000-sample receive banks and 512-word
// transmit FIFOs. Received samples arrive every third clock, faster than
// the real 4 MHz in a 250 MHz fabric, to keep the run short; the data path
// does not depend on the gap. The sequence is in tb_radio_seq.svh.
module tb_ldacs_radio_full;
  import ldacs_pkg::*;
  import tb_util_pkg::*;

  localparam int N_SAMPLES  = 20000;
  localparam int BANK_DEPTH = 2000;
  localparam int FIFO_DEPTH = 512;
  localparam int RX_GAP     = 3;

  `include "tb_radio_seq.svh"

  ldacs_radio_top dut (.*);

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
