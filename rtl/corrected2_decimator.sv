// corrected2_decimator: two-stage comb decimator followed by a fixed
// sharpened-corrector stage (the corrected-2 structure).
//
// Decimation M = M1 * M2 * 2. The two-stage structure (non-recursive comb by
// M1 = 2^N_DEC2, CIC by M2, K cascaded sections) lowers the rate by M1 M2;
// the last stage (sharpened_corrector) applies C_1(z) and the sharpened
// C_1(z)(1 + z^-1) and decimates by the final two. The last stage does not
// depend on K. Defaults: M = 144 = 2 * 36 * 2, K = 3.
//
// Interface: in_valid/in_data input stream; out_valid pulses once per M input
// samples. Output word exact (WIN + K + K*ceil(log2 M2) + 21 bits).
// Synchronous active-low reset.
//
// Follows the source structure: C_1 and the 2H - H^2 sharpening of C_1(1 + z^-1)
// in the last stage, M = M1 * M2 * 2. Where the sharpened term and the down-
// sampler sit, and the z^-3 alignment delay, are this design's reading of it.
module corrected2_decimator
  import decim_pkg::*;
#(
  parameter int unsigned K      = 3,
  parameter int unsigned WIN    = 2,
  parameter int unsigned N_DEC2 = 1,
  parameter int unsigned M2     = 36,
  parameter int unsigned W_TS   = WIN + N_DEC2 * growth_bits(2, K) + growth_bits(M2, K),
  parameter int unsigned WOUT   = W_TS + coef_growth(corrector_coefs(1)) + 15
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [WIN-1:0]  in_data,
  output logic                   out_valid,
  output logic signed [WOUT-1:0] out_data
);

  logic                   ts_valid;
  logic signed [W_TS-1:0] ts_data;

  two_stage_decimator #(
    .K(K), .WIN(WIN), .N_DEC2(N_DEC2), .N_DEC3(0), .POLYPHASE(1'b0),
    .M2(M2), .CIC_D(1), .FINAL_N(0), .WOUT(W_TS)
  ) u_two_stage (
    .clk, .rst_n, .in_valid, .in_data,
    .out_valid(ts_valid), .out_data(ts_data)
  );

  sharpened_corrector #(.WIN(W_TS), .WOUT(WOUT)) u_sharp (
    .clk, .rst_n,
    .in_valid(ts_valid), .in_data(ts_data),
    .out_valid, .out_data
  );

endmodule
