// Spectrum-sensing sequencer.
//
// One scan covers the 23 reverse-link LDACS1 channels, four at a time: for
// group g (channels 4g..4g+3) it asks the RF interface to retune
// (tune_req/tune_group until tune_ack), flushes the receive buffer and the
// filter bank so no samples of the previous tuning remain, starts the four
// energy detectors together and waits until all four report. The energies
// are stored per channel (channels past 22 in the last group are dropped).
// After six groups done pulses and busy falls; energy[] and occupied[]
// (energy above threshold) are then the list software chooses a free
// channel from. Four bands per pass and 23 channels follow the
// architecture; the retune handshake, the flush and the threshold compare
// are this design's choices.
//
// A scan may be started while the filter bank is still being loaded into
// the reconfigurable region: samples taken after the flush wait in the
// receive buffer, and the detectors are started only once meas_ok (filter
// bank live) is high. Loading and acquisition then overlap, which hides
// the load time; this follows the architecture, the meas_ok handshake is
// this design's.
//
// Timing: start is taken only when idle. flush is a one-cycle pulse the
// cycle after tune_ack; ed_start follows one cycle later, or later still
// if meas_ok is low.
module sense_ctrl
  import ldacs_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [EW-1:0] threshold,
  output logic          tune_req,
  output logic [2:0]    tune_group,
  input  logic          tune_ack,
  input  logic          meas_ok,
  output logic          flush,
  output logic          ed_start,
  input  logic [3:0]    ed_done,
  input  logic [EW-1:0] ed_energy [BANDS],
  output logic          busy,
  output logic          done,
  output logic [EW-1:0] energy [N_CHAN],
  output logic [N_CHAN-1:0] occupied
);

  typedef enum logic [2:0] {S_IDLE, S_TUNE, S_FLUSH, S_START, S_MEASURE, S_NEXT} state_e;

  state_e     state;
  logic [3:0] seen;

  assign busy = (state != S_IDLE);

  always_comb begin
    for (int c = 0; c < N_CHAN; c++) occupied[c] = (energy[c] > threshold);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      tune_req   <= 1'b0;
      tune_group <= '0;
      flush      <= 1'b0;
      ed_start   <= 1'b0;
      done       <= 1'b0;
      seen       <= '0;
      for (int c = 0; c < N_CHAN; c++) energy[c] <= '0;
    end else begin
      flush    <= 1'b0;
      ed_start <= 1'b0;
      done     <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          tune_group <= '0;
          tune_req   <= 1'b1;
          state      <= S_TUNE;
        end
        S_TUNE: if (tune_ack) begin
          tune_req <= 1'b0;
          flush    <= 1'b1;
          state    <= S_FLUSH;
        end
        S_FLUSH: if (meas_ok) begin
          ed_start <= 1'b1;
          seen     <= '0;
          state    <= S_START;
        end
        S_START: state <= S_MEASURE;
        S_MEASURE: begin
          seen <= seen | ed_done;
          if ((seen | ed_done) == 4'hf) begin
            for (int b = 0; b < BANDS; b++)
              for (int c = 0; c < N_CHAN; c++)
                if (c == int'(tune_group) * BANDS + b) energy[c] <= ed_energy[b];
            state <= S_NEXT;
          end
        end
        S_NEXT: if (int'(tune_group) == N_GROUPS - 1) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end else begin
          tune_group <= tune_group + 1'b1;
          tune_req   <= 1'b1;
          state      <= S_TUNE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The retune request is held until it is acknowledged.
  assert property (@(posedge clk) disable iff (rst)
                   tune_req && !tune_ack |=> tune_req);

endmodule
