// Partially reconfigurable region (PRR) of the baseband.
//
// On the device the region holds one module at a time and is rewritten by
// partial reconfiguration. RTL cannot swap logic at run time, so here all
// three modules the region can hold are present and mode selects the one
// that is live; the others receive no data. decouple (high while the region
// is being rewritten and for one cycle after) clears every module's state
// and blocks its outputs, as a freshly loaded module would start.
//
//   MODE_BYPASS  receive: a registered valid/ready stage passes the
//                received stream to the receive baseband (up_*).
//   MODE_FFB     sensing: the received stream feeds the fast filter bank;
//                an energy detector on each of the four LDACS1 subbands
//                (-1, 0, +1, +2 MHz, in that band order) measures a window.
//   MODE_CF      transmit: tx_in_* -> transmit FIFO -> channel filter ->
//                output FIFO -> rf_tx_*. A sample leaves the transmit FIFO
//                only when the filter is ready (it takes one every second
//                cycle, I and Q sharing its multipliers) and the output FIFO
//                has room for it and those in the filter pipeline, so the
//                RF side can stall the chain.
//
// The three modules, their roles and the FIFOs on both sides of the channel
// filter follow the architecture; modelling the region by a mode select,
// the bypass register stage and the FIFO depths are this design's choices.
// Coefficients are kept across reconfiguration (they are cleared only by
// rst) so software need not reload them each time.
//
// While decoupled the received stream is held back (rx_ready low), so
// samples gathered during a load wait in the receive buffer for the module
// being loaded. Otherwise, in the channel-filter mode, which does not use
// it, the received stream is accepted and discarded, so the receive buffer
// never backs up. ffb_clear flushes the filter bank (after a retune).
// ffb_live tells the sensing sequencer that the filter bank can measure.
module prr
  import ldacs_pkg::*;
#(
  parameter int N_SAMPLES = 20000,  // energy window per detector
  parameter int FIFO_DEPTH = 512
) (
  input  logic                 clk,
  input  logic                 rst,
  input  prr_mode_e            mode,
  input  logic                 decouple,
  // received samples (from the receive double buffer)
  input  logic                 rx_valid,
  output logic                 rx_ready,
  input  cplx_t                rx_data,
  // bypass output to the receive baseband / DMA
  output logic                 up_valid,
  input  logic                 up_ready,
  output cplx_t                up_data,
  // transmit samples from DMA, filtered samples to the RF interface
  input  logic                 tx_in_valid,
  output logic                 tx_in_ready,
  input  cplx_t                tx_in_data,
  output logic                 rf_tx_valid,
  input  logic                 rf_tx_ready,
  output cplx_t                rf_tx_data,
  // coefficient writes
  input  logic                 ffb_coef_we,
  input  logic [2:0]           ffb_coef_filt,
  input  logic [5:0]           ffb_coef_idx,
  input  logic signed [CW-1:0] ffb_coef_re,
  input  logic signed [CW-1:0] ffb_coef_im,
  input  logic                 cf_coef_we,
  input  logic [6:0]           cf_coef_idx,
  input  logic signed [CW-1:0] cf_coef_data,
  // energy detectors
  input  logic                 ffb_clear,
  input  logic                 ed_start,
  output logic                 ffb_live,
  output logic [3:0]           ed_done,
  output logic [EW-1:0]        ed_energy [BANDS]
);

  localparam int SUBBAND_OF_BAND [BANDS] = '{6, 0, 2, 4};

  logic live_bypass, live_ffb, live_cf;
  assign live_bypass = (mode == MODE_BYPASS) && !decouple;
  assign live_ffb    = (mode == MODE_FFB)    && !decouple;
  assign live_cf     = (mode == MODE_CF)     && !decouple;

  // ---------------- bypass logic -------------------------------------
  logic  byp_valid;
  cplx_t byp_data;

  always_ff @(posedge clk) begin
    if (rst || decouple) begin
      byp_valid <= 1'b0;
      byp_data  <= '0;
    end else if (!byp_valid || up_ready) begin
      byp_valid <= live_bypass && rx_valid;
      byp_data  <= rx_data;
    end
  end

  assign up_valid = byp_valid;
  assign up_data  = byp_data;
  assign rx_ready = decouple    ? 1'b0 :
                    live_bypass ? (!byp_valid || up_ready) : 1'b1;
  assign ffb_live = live_ffb;

  // ---------------- fast filter bank + energy detectors ---------------
  logic  fb_valid;
  cplx_t fb_sub [8];

  ffb u_ffb (
    .clk, .rst,
    .clear(decouple || ffb_clear),
    .coef_we(ffb_coef_we), .coef_filt(ffb_coef_filt), .coef_idx(ffb_coef_idx),
    .coef_re(ffb_coef_re), .coef_im(ffb_coef_im),
    .in_valid(live_ffb && rx_valid), .in_data(rx_data),
    .out_valid(fb_valid), .subband(fb_sub)
  );

  for (genvar b = 0; b < BANDS; b++) begin : g_ed
    logic ed_busy;
    energy_detector #(.N_SAMPLES(N_SAMPLES)) u_ed (
      .clk, .rst(rst || decouple),
      .start(ed_start && live_ffb),
      .in_valid(fb_valid), .in_data(fb_sub[SUBBAND_OF_BAND[b]]),
      .busy(ed_busy), .done(ed_done[b]), .energy(ed_energy[b])
    );
  end

  // ---------------- channel filter with its FIFOs ---------------------
  logic                     txf_valid, txf_pop;
  cplx_t                    txf_data;
  logic                     cf_valid, cf_in_ready;
  cplx_t                    cf_data;
  logic                     of_in_ready;
  logic [$clog2(FIFO_DEPTH):0] of_count, txf_count;

  stream_fifo #(.W(2*DW), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk, .rst, .clear(decouple),
    .in_valid(tx_in_valid && live_cf), .in_ready(tx_in_ready), .in_data(tx_in_data),
    .out_valid(txf_valid), .out_ready(txf_pop), .out_data(txf_data),
    .count(txf_count)
  );

  assign txf_pop = live_cf && txf_valid && cf_in_ready &&
                   (of_count <= ($clog2(FIFO_DEPTH)+1)'(FIFO_DEPTH - 3));

  channel_filter u_cf (
    .clk, .rst, .clear(decouple),
    .coef_we(cf_coef_we), .coef_idx(cf_coef_idx), .coef_data(cf_coef_data),
    .in_valid(txf_pop), .in_ready(cf_in_ready), .in_data(txf_data),
    .out_valid(cf_valid), .out_data(cf_data)
  );

  stream_fifo #(.W(2*DW), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst, .clear(decouple),
    .in_valid(cf_valid), .in_ready(of_in_ready), .in_data(cf_data),
    .out_valid(rf_tx_valid), .out_ready(rf_tx_ready && live_cf), .out_data(rf_tx_data),
    .count(of_count)
  );

  // The credit rule above must never let a filtered sample meet a full FIFO.
  assert property (@(posedge clk) disable iff (rst) cf_valid |-> of_in_ready);

endmodule
