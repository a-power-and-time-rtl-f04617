// Programmable-logic part of an LDACS1 air-to-ground radio with dynamic
// spectrum access.
//
// Spectrum sensing (a fast filter bank with energy detectors) and transmit
// shaping (a 201-tap channel filter) are never needed at the same time, so
// they share one partially reconfigurable region (PRR) which, in normal
// receive operation, holds a bypass instead. The blocks here:
//
//   rf_rx_* -> rx_double_buffer -> prr (bypass | FFB+detectors | CF) -> up_*
//   dma_tx_* ----------------------> prr (CF)  -> rf_tx_*
//   dma_bs_* -> reconfig_ctrl -> icap_*;  reconfig_ctrl.mode/decouple -> prr
//   sense_ctrl: retunes the RF front end (tune_*), runs the detectors and
//               keeps per-channel energies and occupied flags
//   register bus from the processor: requests, coefficients, results
//
// The processor, the DMA engines, the RF interface core and the device's
// configuration port are outside; their streams and handshakes are ports.
// The partition into these blocks follows the architecture; the register
// map, the single-cycle register bus (in place of a standard one) and the
// retune handshake are this design's choices.
//
// Register bus: cfg_we writes cfg_wdata to word address cfg_addr on the
// clock edge; cfg_rdata is a combinational read of cfg_addr.
//   0x000 W  bits 1:0: load this module into the PRR (0 bypass, 1 filter
//            bank, 2 channel filter); ignored while a load is running
//   0x001 RW bitstream length in 32-bit words (bits 23:0)
//   0x002 R  bits 1:0 live module, 2 load busy, 3 scan busy, 4 scan done
//            (sticky, cleared by a new scan), 5 receive buffer overflow
//   0x003 W  bit 0: start a spectrum scan
//   0x004/5  RW detection threshold, bits 31:0 / 47:32
//   0x006 R  occupied flags, bit c = channel c
//   0x040 + 2c (+1) R  energy of channel c, bits 31:0 (47:32)
//   0x100 + i W  channel filter coefficient h[i] = h[200-i], i < 101
//   0x400 + 64f + n W  real part of filter-bank node f coefficient c[n],
//                      n = 0..(taps-1)/2 (staged until the next write)
//   0x800 + 64f + n W  imaginary part; writes both parts of c[n]
// irq pulses when a scan or a module load completes. The receive buffer is
// emptied when a load is requested and then keeps what arrives during the
// load (up to two banks) for the new module, so a scan may be started while
// the filter bank is still loading and acquisition overlaps the load.
module ldacs_radio_top
  import ldacs_pkg::*;
#(
  parameter int N_SAMPLES  = 20000,   // sensing window per channel group
  parameter int BANK_DEPTH = 2000,    // receive double-buffer bank
  parameter int FIFO_DEPTH = 512      // channel-filter FIFOs
) (
  input  logic        clk,
  input  logic        rst,
  // register bus from the processor
  input  logic        cfg_we,
  input  logic [11:0] cfg_addr,
  input  logic [31:0] cfg_wdata,
  output logic [31:0] cfg_rdata,
  output logic        irq,
  // RF interface
  input  logic        rf_rx_valid,
  input  cplx_t       rf_rx_data,
  output logic        rf_tx_valid,
  input  logic        rf_tx_ready,
  output cplx_t       rf_tx_data,
  output logic        tune_req,
  output logic [2:0]  tune_group,
  input  logic        tune_ack,
  // DMA streams
  input  logic        dma_tx_valid,
  output logic        dma_tx_ready,
  input  cplx_t       dma_tx_data,
  output logic        dma_rx_valid,
  input  logic        dma_rx_ready,
  output cplx_t       dma_rx_data,
  input  logic        dma_bs_valid,
  output logic        dma_bs_ready,
  input  logic [31:0] dma_bs_data,
  // configuration port
  output logic        icap_csib,
  output logic        icap_rdwrb,
  output logic [31:0] icap_i
);

  // ---------------- registers ----------------------------------------
  logic [23:0]         bs_words;
  logic [EW-1:0]       threshold;
  logic [CW-1:0]       ffb_re_stage;
  logic                scan_done_flag;

  logic                rc_req, rc_busy, rc_done, decouple;
  prr_mode_e           mode;
  logic                sc_start, sc_busy, sc_done, sc_flush;
  logic                ed_start, ffb_live;
  logic [3:0]          ed_done;
  logic [EW-1:0]       ed_energy [BANDS];
  logic [EW-1:0]       ch_energy [N_CHAN];
  logic [N_CHAN-1:0]   occupied;
  logic                rxb_valid, rxb_ready, rxb_overflow;
  cplx_t               rxb_data;

  logic                ffb_we, cf_we;

  assign rc_req   = cfg_we && cfg_addr == REG_MODE_REQ;
  assign sc_start = cfg_we && cfg_addr == REG_SENSE && cfg_wdata[0];
  assign cf_we    = cfg_we && cfg_addr >= REG_CF_COEF && cfg_addr < REG_CF_COEF + 12'd101;
  assign ffb_we   = cfg_we && cfg_addr[11:10] == 2'b10;

  always_ff @(posedge clk) begin
    if (rst) begin
      bs_words       <= '0;
      threshold      <= '0;
      ffb_re_stage   <= '0;
      scan_done_flag <= 1'b0;
    end else begin
      if (cfg_we && cfg_addr == REG_BS_WORDS)  bs_words <= cfg_wdata[23:0];
      if (cfg_we && cfg_addr == REG_THRESH_LO) threshold[31:0] <= cfg_wdata;
      if (cfg_we && cfg_addr == REG_THRESH_HI) threshold[EW-1:32] <= cfg_wdata[EW-33:0];
      if (cfg_we && cfg_addr[11:10] == 2'b01)  ffb_re_stage <= cfg_wdata[CW-1:0];
      if (sc_start && !sc_busy) scan_done_flag <= 1'b0;
      else if (sc_done)         scan_done_flag <= 1'b1;
    end
  end

  always_comb begin
    cfg_rdata = '0;
    unique case (cfg_addr)
      REG_BS_WORDS:  cfg_rdata = {8'd0, bs_words};
      REG_STATUS:    cfg_rdata = {26'd0, rxb_overflow, scan_done_flag, sc_busy, rc_busy, mode};
      REG_THRESH_LO: cfg_rdata = threshold[31:0];
      REG_THRESH_HI: cfg_rdata = 32'(threshold[EW-1:32]);
      REG_OCCUPIED:  cfg_rdata = 32'(occupied);
      default: begin
        for (int c = 0; c < N_CHAN; c++) begin
          if (cfg_addr == REG_ENERGY + 12'(2*c))     cfg_rdata = ch_energy[c][31:0];
          if (cfg_addr == REG_ENERGY + 12'(2*c + 1)) cfg_rdata = 32'(ch_energy[c][EW-1:32]);
        end
      end
    endcase
  end

  assign irq = sc_done || rc_done;

  // ---------------- reconfiguration manager ---------------------------
  reconfig_ctrl u_reconfig (
    .clk, .rst,
    .req(rc_req), .req_mode(prr_mode_e'(cfg_wdata[1:0])), .req_words(bs_words),
    .bs_valid(dma_bs_valid), .bs_ready(dma_bs_ready), .bs_data(dma_bs_data),
    .icap_csib, .icap_rdwrb, .icap_i,
    .mode, .decouple, .busy(rc_busy), .done(rc_done)
  );

  // ---------------- receive double buffer -----------------------------
  rx_double_buffer #(.BANK_DEPTH(BANK_DEPTH)) u_rxbuf (
    .clk, .rst, .flush(sc_flush || (rc_req && !rc_busy)),
    .in_valid(rf_rx_valid), .in_data(rf_rx_data),
    .out_valid(rxb_valid), .out_ready(rxb_ready), .out_data(rxb_data),
    .overflow(rxb_overflow)
  );

  // ---------------- spectrum-sensing sequencer ------------------------
  sense_ctrl u_sense (
    .clk, .rst, .start(sc_start), .threshold,
    .tune_req, .tune_group, .tune_ack, .meas_ok(ffb_live),
    .flush(sc_flush), .ed_start, .ed_done, .ed_energy,
    .busy(sc_busy), .done(sc_done), .energy(ch_energy), .occupied
  );

  // ---------------- reconfigurable region -----------------------------
  prr #(.N_SAMPLES(N_SAMPLES), .FIFO_DEPTH(FIFO_DEPTH)) u_prr (
    .clk, .rst, .mode, .decouple,
    .rx_valid(rxb_valid), .rx_ready(rxb_ready), .rx_data(rxb_data),
    .up_valid(dma_rx_valid), .up_ready(dma_rx_ready), .up_data(dma_rx_data),
    .tx_in_valid(dma_tx_valid), .tx_in_ready(dma_tx_ready), .tx_in_data(dma_tx_data),
    .rf_tx_valid, .rf_tx_ready, .rf_tx_data,
    .ffb_coef_we(ffb_we), .ffb_coef_filt(cfg_addr[8:6]), .ffb_coef_idx(cfg_addr[5:0]),
    .ffb_coef_re(ffb_re_stage), .ffb_coef_im(cfg_wdata[CW-1:0]),
    .cf_coef_we(cf_we), .cf_coef_idx(7'(cfg_addr - REG_CF_COEF)), .cf_coef_data(cfg_wdata[CW-1:0]),
    .ffb_clear(sc_flush), .ffb_live, .ed_start, .ed_done, .ed_energy
  );

endmodule
