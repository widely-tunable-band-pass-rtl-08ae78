// corrected1_decimator: two-stage comb decimator with the corrector C_K
// (the corrected-1 structure).
//
// H(z) = H_P(z) C_K(z^(M/2)), decimation M = M1 * M2. H_P is the two-stage
// structure (non-recursive comb by M1 = 2^N_DEC2, then CIC by M2). The
// corrector C_K runs at a rate M/2 below the input, i.e. between the CIC and
// the last down-sampling by two, so the CIC is built to decimate by M2/2 with
// the comb delay of an M2 CIC (CIC_D = 2) and the corrector keeps every second
// result. The corrector compensates the comb passband droop and improves the
// attenuation of the first and all odd folding bands, without a multiplier.
//
// Defaults: M1 = 4, M2 = 128 (M = 512), K = 3 with C_3.
//
// Interface: in_valid/in_data input stream; out_valid pulses once per M input
// samples. Output word WIN + 2K (first stage) + K log2(M2) (CIC) + 6 (C_3)
// bits: 36 bits at the defaults (3-bit input), the result is exact. Synchronous
// active-low reset.
//
// H_P(z) C_K(z^(M/2)) and the C_K table follow the source; realising the
// corrector's rate with a CIC of differential delay 2, and the word widths,
// are this design's own choices.
module corrected1_decimator
  import decim_pkg::*;
#(
  parameter int unsigned K      = 3,
  parameter int unsigned WIN    = 3,
  parameter int unsigned N_DEC2 = 2,
  parameter int unsigned M2     = 128,
  parameter int unsigned W_TS   = WIN + N_DEC2 * growth_bits(2, K) + growth_bits(M2, K),
  parameter int unsigned WOUT   = W_TS + coef_growth(corrector_coefs(K))
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
    .M2(M2 / 2), .CIC_D(2), .FINAL_N(0), .WOUT(W_TS)
  ) u_two_stage (
    .clk, .rst_n, .in_valid, .in_data,
    .out_valid(ts_valid), .out_data(ts_data)
  );

  corrector_filter #(.KC(K), .DEC(2), .WIN(W_TS), .WOUT(WOUT)) u_corr (
    .clk, .rst_n,
    .in_valid(ts_valid), .in_data(ts_data),
    .out_valid, .out_data
  );

endmodule
