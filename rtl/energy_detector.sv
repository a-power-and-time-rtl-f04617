// Energy detector for one filter-bank subband.
//
// After a start pulse it sums |x|^2 = I^2 + Q^2 over the next N_SAMPLES
// valid samples, then presents the total on energy with a one-cycle done
// pulse and stops until the next start. The total is the measure of
// whether an LDACS1 signal is present in the subband; the decision against
// a threshold is made by the sensing controller. The 20000-sample window is
// the figure the sensing time is based on; the 48-bit accumulator (enough
// for 20000 full-scale samples) is this design's choice.
//
// Timing: the sample with in_valid in the same cycle as start is not
// counted. done rises the cycle after the N_SAMPLES-th sample is accepted;
// energy holds until the next start.
module energy_detector
  import ldacs_pkg::*;
#(
  parameter int N_SAMPLES = 20000
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          in_valid,
  input  cplx_t         in_data,
  output logic          busy,
  output logic          done,
  output logic [EW-1:0] energy
);

  logic [31:0]   cnt;
  logic [EW-1:0] acc;
  logic [2*DW:0] mag2;

  always_comb begin
    mag2 = (2*DW+1)'(unsigned'(32'(in_data.re * in_data.re)))
         + (2*DW+1)'(unsigned'(32'(in_data.im * in_data.im)));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      cnt    <= '0;
      acc    <= '0;
      energy <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        cnt  <= '0;
        acc  <= '0;
      end else if (busy && in_valid) begin
        acc <= acc + EW'(mag2);
        if (cnt == 32'(N_SAMPLES - 1)) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          energy <= acc + EW'(mag2);
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
