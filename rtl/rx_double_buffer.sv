// Receive double (ping-pong) buffer in front of the filter bank.
//
// Samples from the RF interface arrive at the 4 MHz sample rate and are
// written into one of two banks. When a bank is full it is handed to the
// read side, which streams it out as one burst at up to one sample per
// fabric clock, while the other bank fills. The filter bank therefore sees
// bursts of BANK_DEPTH samples and can run far faster than the sample rate,
// overlapping processing with acquisition. The double buffer and its burst
// output follow the architecture; the bank depth (2000 samples, so a
// 20000-sample sensing window is ten bursts) and the overflow flag are this
// design's choices.
//
// Interface: in_valid/in_data are always accepted; a sample that finds
// both banks full is dropped and sets the sticky overflow flag. A bank is
// only offered for reading once it is full. out_valid/out_ready/out_data
// is a first-word fall-through stream. flush (used after a retune and when
// a module load is requested) empties both banks and clears overflow.
module rx_double_buffer
  import ldacs_pkg::*;
#(
  parameter int BANK_DEPTH = 2000
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  flush,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out_data,
  output logic  overflow
);

  localparam int IW = $clog2(BANK_DEPTH);

  cplx_t         mem [2][BANK_DEPTH];
  logic [1:0]    full;
  logic          wbank, rbank;
  logic [IW-1:0] widx, ridx;

  assign out_valid = full[rbank];
  assign out_data  = mem[rbank][ridx];

  always_ff @(posedge clk) begin
    if (in_valid && !full[wbank]) mem[wbank][widx] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      full     <= '0;
      wbank    <= 1'b0;
      rbank    <= 1'b0;
      widx     <= '0;
      ridx     <= '0;
      overflow <= 1'b0;
    end else begin
      if (in_valid) begin
        if (full[wbank]) begin
          overflow <= 1'b1;
        end else if (widx == IW'(BANK_DEPTH - 1)) begin
          widx        <= '0;
          wbank       <= ~wbank;
          full[wbank] <= 1'b1;
        end else begin
          widx <= widx + 1'b1;
        end
      end
      if (out_valid && out_ready) begin
        if (ridx == IW'(BANK_DEPTH - 1)) begin
          ridx        <= '0;
          rbank       <= ~rbank;
          full[rbank] <= 1'b0;
        end else begin
          ridx <= ridx + 1'b1;
        end
      end
    end
  end

endmodule
