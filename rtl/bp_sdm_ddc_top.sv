// bp_sdm_ddc_top: digital back end of a band-pass sigma-delta ADC built from
// power- and area-efficient two-stage comb decimators.
//
// Two independent parts sit side by side:
//
//  1. Digital down-converter (bp_* ports). The output code of a band-pass
//     modulator whose notch is at fs/4 is mixed to baseband by an fs/4
//     quadrature mixer (the oscillator sequences are only +1, 0, -1), and the
//     I and Q streams are each decimated by M = 512 by a corrected-1
//     decimator: non-recursive comb by M1 = 4, CIC by M2 = 128, K = 3, and the
//     multiplierless corrector C_3 before the last factor of two.
//
//  2. A bank of two-stage decimators for M = 144, the family meant for even
//     decimation factors and factors that are multiples of three, all fed from
//     one low-pass modulator stream (lp_* ports): Direct-1 (4 * 36),
//     Direct-2 (2 * 72), Direct-3 (2 * 3 * 24), Modified-Direct-1
//     (2 * 36 * 2, K1 = 1), Modified-Direct-3 (2 * 24 * 3, K1 = 1),
//     Polyphase-4 (polyphase 3, CIC 48) and Corrected-2 (2 * 36 * 2 with the
//     sharpened C_1 stage). They compute the same signal with different
//     power/area/alias-rejection trade-offs and can be compared directly.
//
// Inputs are two's complement codes (a one-bit modulator gives 2'b01 for +1
// and 2'b11 for -1). Every output is at full precision (no rounding); its gain
// is the product of the stage gains (M^K for the plain structures). Every
// output stream has its own one-cycle valid pulse, once per M input samples.
// Synchronous active-low reset. The choice of which structure serves the
// down-converter, and the widths of all words, are this design's own.
module bp_sdm_ddc_top
  import decim_pkg::*;
#(
  parameter int unsigned WIN = 2,
  parameter int unsigned K   = 3,
  // widths of the outputs (exact, derived)
  parameter int unsigned W_DDC  = WIN + 1 + 2 * growth_bits(2, K) + growth_bits(128, K)
                                  + coef_growth(corrector_coefs(K)),
  parameter int unsigned W_DIR1 = WIN + 2 * growth_bits(2, K) + growth_bits(36, K),
  parameter int unsigned W_DIR2 = WIN + growth_bits(2, K) + growth_bits(72, K),
  parameter int unsigned W_DIR3 = WIN + growth_bits(2, K) + growth_bits(3, K) + growth_bits(24, K),
  parameter int unsigned W_MOD1 = WIN + growth_bits(2, K) + growth_bits(36, K) + growth_bits(2, K + 1),
  parameter int unsigned W_MOD3 = WIN + growth_bits(2, K) + growth_bits(24, K) + growth_bits(3, K + 1),
  parameter int unsigned W_PP4  = WIN + growth_bits(3, K) + growth_bits(48, K),
  parameter int unsigned W_COR2 = WIN + growth_bits(2, K) + growth_bits(36, K)
                                  + coef_growth(corrector_coefs(1)) + 15
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // band-pass modulator stream -> fs/4 down-converter -> I/Q decimators
  input  logic                     bp_valid,
  input  logic signed [WIN-1:0]    bp_code,
  output logic                     i_valid,
  output logic signed [W_DDC-1:0]  i_data,
  output logic                     q_valid,
  output logic signed [W_DDC-1:0]  q_data,
  // low-pass modulator stream -> M = 144 decimator bank
  input  logic                     lp_valid,
  input  logic signed [WIN-1:0]    lp_code,
  output logic                     dir1_valid,
  output logic signed [W_DIR1-1:0] dir1_data,
  output logic                     dir2_valid,
  output logic signed [W_DIR2-1:0] dir2_data,
  output logic                     dir3_valid,
  output logic signed [W_DIR3-1:0] dir3_data,
  output logic                     mod1_valid,
  output logic signed [W_MOD1-1:0] mod1_data,
  output logic                     mod3_valid,
  output logic signed [W_MOD3-1:0] mod3_data,
  output logic                     pp4_valid,
  output logic signed [W_PP4-1:0]  pp4_data,
  output logic                     cor2_valid,
  output logic signed [W_COR2-1:0] cor2_data
);

  // ---------------- part 1: digital down-converter ----------------
  logic                  mix_valid;
  logic signed [WIN:0]   mix_i, mix_q;

  fs4_quadrature_mixer #(.WIN(WIN)) u_mixer (
    .clk, .rst_n, .in_valid(bp_valid), .in_data(bp_code),
    .out_valid(mix_valid), .i_data(mix_i), .q_data(mix_q)
  );

  corrected1_decimator #(.K(K), .WIN(WIN + 1), .N_DEC2(2), .M2(128), .WOUT(W_DDC)) u_dec_i (
    .clk, .rst_n, .in_valid(mix_valid), .in_data(mix_i),
    .out_valid(i_valid), .out_data(i_data)
  );

  corrected1_decimator #(.K(K), .WIN(WIN + 1), .N_DEC2(2), .M2(128), .WOUT(W_DDC)) u_dec_q (
    .clk, .rst_n, .in_valid(mix_valid), .in_data(mix_q),
    .out_valid(q_valid), .out_data(q_data)
  );

  // ---------------- part 2: M = 144 decimator bank ----------------
  two_stage_decimator #(.K(K), .WIN(WIN), .N_DEC2(2), .M2(36), .WOUT(W_DIR1)) u_direct1 (
    .clk, .rst_n, .in_valid(lp_valid), .in_data(lp_code),
    .out_valid(dir1_valid), .out_data(dir1_data)
  );

  two_stage_decimator #(.K(K), .WIN(WIN), .N_DEC2(1), .M2(72), .WOUT(W_DIR2)) u_direct2 (
    .clk, .rst_n, .in_valid(lp_valid), .in_data(lp_code),
    .out_valid(dir2_valid), .out_data(dir2_data)
  );

  two_stage_decimator #(.K(K), .WIN(WIN), .N_DEC2(1), .N_DEC3(1), .M2(24), .WOUT(W_DIR3)) u_direct3 (
    .clk, .rst_n, .in_valid(lp_valid), .in_data(lp_code),
    .out_valid(dir3_valid), .out_data(dir3_data)
  );

  two_stage_decimator #(.K(K), .WIN(WIN), .N_DEC2(1), .M2(36), .FINAL_N(2), .K_FINAL(K + 1),
                        .WOUT(W_MOD1)) u_mod_direct1 (
    .clk, .rst_n, .in_valid(lp_valid), .in_data(lp_code),
    .out_valid(mod1_valid), .out_data(mod1_data)
  );

  two_stage_decimator #(.K(K), .WIN(WIN), .N_DEC2(1), .M2(24), .FINAL_N(3), .K_FINAL(K + 1),
                        .WOUT(W_MOD3)) u_mod_direct3 (
    .clk, .rst_n, .in_valid(lp_valid), .in_data(lp_code),
    .out_valid(mod3_valid), .out_data(mod3_data)
  );

  two_stage_decimator #(.K(K), .WIN(WIN), .N_DEC2(0), .N_DEC3(1), .POLYPHASE(1'b1), .M2(48),
                        .WOUT(W_PP4)) u_polyphase4 (
    .clk, .rst_n, .in_valid(lp_valid), .in_data(lp_code),
    .out_valid(pp4_valid), .out_data(pp4_data)
  );

  corrected2_decimator #(.K(K), .WIN(WIN), .N_DEC2(1), .M2(36), .WOUT(W_COR2)) u_corrected2 (
    .clk, .rst_n, .in_valid(lp_valid), .in_data(lp_code),
    .out_valid(cor2_valid), .out_data(cor2_data)
  );

endmodule
