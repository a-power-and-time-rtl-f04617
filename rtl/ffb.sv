// Fast filter bank (FFB): 3 stages, 8 uniform subbands of 500 kHz over a
// 4 MHz complex stream.
//
// The bank is a binary tree of ffb_filter nodes. Stage i uses a prototype
// interpolated by M_i = 2^(3-i) (4, 2, 1), so each stage halves the width
// of the bands that pass, and each node splits its input into its original
// and complementary response:
//
//   F10(z^4) --orig--> F20(z^2) --orig--> F30(z) -> orig: 0 Hz,  comp: 2 MHz
//            |                  \-comp--> F31(z) -> orig: +1 MHz, comp: -1 MHz
//            \-comp--> F21(z^2) --orig--> F32(z) -> orig: +0.5,  comp: -1.5 MHz
//                               \-comp--> F33(z) -> orig: -0.5,  comp: +1.5 MHz
//
// The frequency shift each node needs (F21: +500 kHz, F31: +1 MHz, F32:
// +500 kHz, F33: -500 kHz, the others none) is in its loaded coefficients.
// subband[k] is the band centred at k*500 kHz (modulo 4 MHz); the four
// LDACS1 channels of a pass are subband 6, 0, 2 and 4 (-1, 0, +1, +2 MHz).
// The tree, its interpolation factors and the 8-subband size follow the
// architecture, and so does the count of 70 coefficient multipliers: the
// prototype lengths (35/19/15 taps, folded to 18+2*10+4*8 = 70 shared
// complex coefficients) and the shift assignment are this design's
// choices.
//
// Interface: one sample per cycle on in_valid/in_data; out_valid and all 8
// subbands appear 3 cycles later. coef_filt selects the node (0 = F10,
// 1 = F20, 2 = F21, 3..6 = F30..F33) for a coefficient write.
module ffb
  import ldacs_pkg::*;
#(
  parameter int TAPS1 = 35,
  parameter int TAPS2 = 19,
  parameter int TAPS3 = 15
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear,
  input  logic                 coef_we,
  input  logic [2:0]           coef_filt,
  input  logic [5:0]           coef_idx,
  input  logic signed [CW-1:0] coef_re,
  input  logic signed [CW-1:0] coef_im,
  input  logic                 in_valid,
  input  cplx_t                in_data,
  output logic                 out_valid,
  output cplx_t                subband [8]
);

  logic  v1, v2a, v2b;
  logic  v3 [4];
  cplx_t s1_o, s1_c;
  cplx_t s2_o [2];
  cplx_t s2_c [2];
  cplx_t s3_o [4];
  cplx_t s3_c [4];
  logic  v2 [2];

  ffb_filter #(.TAPS(TAPS1), .M(4)) u_f10 (
    .clk, .rst, .clear,
    .coef_we(coef_we && coef_filt == 3'd0), .coef_idx, .coef_re, .coef_im,
    .in_valid, .in_data,
    .out_valid(v1), .out_orig(s1_o), .out_comp(s1_c)
  );

  ffb_filter #(.TAPS(TAPS2), .M(2)) u_f20 (
    .clk, .rst, .clear,
    .coef_we(coef_we && coef_filt == 3'd1), .coef_idx, .coef_re, .coef_im,
    .in_valid(v1), .in_data(s1_o),
    .out_valid(v2a), .out_orig(s2_o[0]), .out_comp(s2_c[0])
  );

  ffb_filter #(.TAPS(TAPS2), .M(2)) u_f21 (
    .clk, .rst, .clear,
    .coef_we(coef_we && coef_filt == 3'd2), .coef_idx, .coef_re, .coef_im,
    .in_valid(v1), .in_data(s1_c),
    .out_valid(v2b), .out_orig(s2_o[1]), .out_comp(s2_c[1])
  );

  assign v2[0] = v2a;
  assign v2[1] = v2b;

  for (genvar j = 0; j < 4; j++) begin : g_stage3
    ffb_filter #(.TAPS(TAPS3), .M(1)) u_f3 (
      .clk, .rst, .clear,
      .coef_we(coef_we && coef_filt == 3'(3 + j)), .coef_idx, .coef_re, .coef_im,
      .in_valid(v2[j/2]),
      .in_data((j % 2 == 0) ? s2_o[j/2] : s2_c[j/2]),
      .out_valid(v3[j]), .out_orig(s3_o[j]), .out_comp(s3_c[j])
    );
  end

  assign out_valid = v3[0];

  // Leaf outputs ordered by band centre k*500 kHz.
  assign subband[0] = s3_o[0];   // F30 orig:   0 Hz
  assign subband[4] = s3_c[0];   // F30 comp:  +2 MHz (= -2 MHz)
  assign subband[2] = s3_o[1];   // F31 orig:  +1 MHz
  assign subband[6] = s3_c[1];   // F31 comp:  -1 MHz
  assign subband[1] = s3_o[2];   // F32 orig: +0.5 MHz
  assign subband[5] = s3_c[2];   // F32 comp: -1.5 MHz
  assign subband[7] = s3_o[3];   // F33 orig: -0.5 MHz
  assign subband[3] = s3_c[3];   // F33 comp: +1.5 MHz

endmodule
