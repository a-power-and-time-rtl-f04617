// Synchronous FIFO with valid/ready handshakes on both sides.
//
// Used as the transmit buffer in front of the channel filter and as the
// buffer between the channel filter and the RF interface, so that samples
// can be written in bursts (from DMA or from the filter running at fabric
// speed) and drained at the rate the consumer takes them. Storage is a
// DEPTH-word array with read and write pointers one bit wider than the
// address; out_data is the word at the read pointer (first-word
// fall-through). The FIFOs themselves follow the architecture; depth,
// width and the single-clock form are this design's choices.
//
// Interface: a word moves in when in_valid && in_ready and out when
// out_valid && out_ready, both on the rising clock edge. count is the
// number of words held. rst and clear empty the FIFO.
module stream_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 512   // power of two
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   clear,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic [W-1:0]           in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [W-1:0]           out_data,
  output logic [$clog2(DEPTH):0] count
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  assign count     = wp - rp;
  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wp[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (in_valid && in_ready)   wp <= wp + 1'b1;
      if (out_valid && out_ready) rp <= rp + 1'b1;
    end
  end

  // A full FIFO never accepts and an empty one never delivers.
  assert property (@(posedge clk) disable iff (rst) count <= (AW+1)'(DEPTH));

endmodule
