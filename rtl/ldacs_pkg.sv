// Shared types and constants of the LDACS1 radio baseband.
//
// Samples are complex baseband values at 4 MHz, 16-bit signed I and Q
// packed in one 32-bit word (I in the upper half). Filter coefficients are
// 18-bit signed Q1.17 values, so 1.0 is 2^17 and cannot be represented
// exactly (the largest value is 1 - 2^-17). The word widths, the register
// map and the mode encoding are choices of this design; the 4 MHz rate, the
// 23 reverse-link channels, 4 channels per sensing pass and the 20000-sample
// sensing window are the figures the architecture is built around.
package ldacs_pkg;

  localparam int DW = 16;              // I / Q sample width
  localparam int CW = 18;              // coefficient width, Q1.17
  localparam int CFRAC = CW - 1;       // fractional bits of a coefficient
  localparam int EW = 48;              // energy accumulator width

  localparam int N_CHAN = 23;          // reverse-link LDACS1 channels
  localparam int BANDS = 4;            // LDACS1 bands seen per sensing pass
  localparam int N_GROUPS = (N_CHAN + BANDS - 1) / BANDS;  // 6 passes

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Module held by the partially reconfigurable region.
  typedef enum logic [1:0] {
    MODE_BYPASS = 2'd0,   // normal receive: stream to the receive baseband
    MODE_FFB    = 2'd1,   // spectrum sensing: fast filter bank + detectors
    MODE_CF     = 2'd2    // transmit: channel filter
  } prr_mode_e;

  // Word addresses of the register bus.
  localparam logic [11:0] REG_MODE_REQ  = 12'h000;  // W: load module (bits 1:0)
  localparam logic [11:0] REG_BS_WORDS  = 12'h001;  // RW: bitstream length, words
  localparam logic [11:0] REG_STATUS    = 12'h002;  // R: see ldacs_radio_top
  localparam logic [11:0] REG_SENSE     = 12'h003;  // W: bit 0 starts a scan
  localparam logic [11:0] REG_THRESH_LO = 12'h004;  // RW: threshold bits 31:0
  localparam logic [11:0] REG_THRESH_HI = 12'h005;  // RW: threshold bits 47:32
  localparam logic [11:0] REG_OCCUPIED  = 12'h006;  // R: one bit per channel
  localparam logic [11:0] REG_ENERGY    = 12'h040;  // R: 2 words per channel
  localparam logic [11:0] REG_CF_COEF   = 12'h100;  // W: 101 coefficients
  localparam logic [11:0] REG_FFB_RE    = 12'h400;  // W: + filter*64 + tap
  localparam logic [11:0] REG_FFB_IM    = 12'h800;  // W: + filter*64 + tap

  // Round a wide Q(.17) product sum to DW bits with saturation.
  function automatic logic signed [DW-1:0] round_sat(input logic signed [63:0] acc,
                                                    input int shift);
    logic signed [63:0] r;
    r = (acc + (64'sd1 <<< (shift - 1))) >>> shift;
    if (r > 64'sd32767) return 16'sh7fff;
    if (r < -64'sd32768) return -16'sh8000;
    return r[DW-1:0];
  endfunction

  function automatic logic signed [DW-1:0] sat17(input logic signed [DW:0] v);
    if (v > 17'sd32767) return 16'sh7fff;
    if (v < -17'sd32768) return -16'sh8000;
    return v[DW-1:0];
  endfunction

endpackage
