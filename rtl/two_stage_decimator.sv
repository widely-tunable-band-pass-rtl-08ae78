// two_stage_decimator: the two-stage comb-based decimator.
//
// The first stage is a non-recursive comb that lowers the rate cheaply by
// M1 = 2^N_DEC2 * 3^N_DEC3, built as a chain of decimate-by-2 stages followed
// by decimate-by-3 stages, each K cascaded boxcar sections, in direct form
// (nr_comb_stage) or in polyphase form (polyphase_comb_stage, POLYPHASE = 1).
// The second stage is a CIC decimating by M2 (cic_decimator), which keeps the
// area small because its integrators, the only circuits that must run at full
// word length, now run M1 times slower than the input. Referred to the input
// rate the transfer function is
//
//   H(z) = [ prod_i (1 + z^-2^i) * prod_j (1 + z^-a + z^-2a) * (1 - z^-M2*D)/(1 - z^-1) ]^K
//
// (without the 1/M normalisation, which stays in the word). An optional last
// non-recursive stage (FINAL_N = 2 or 3) with K_FINAL = K + K1 sections gives
// the modified structures, whose extra K1 sections raise the alias rejection of
// all folding bands except those that are multiples of FINAL_N. That last
// stage is in direct form, or in polyphase form with FINAL_POLYPHASE = 1. The
// parameters select the structures of the family:
//
//   proposed (power of two), M = 512: N_DEC2=2, M2=128             (default)
//   modified, power of two, M = 512:  N_DEC2=2, M2=64, FINAL_N=2, K_FINAL=K+K1
//   Direct-1 / Polyphase-1, M = 4 L1: N_DEC2=2, M2=L1
//   Direct-2 / Polyphase-2, M = 2 L:  N_DEC2=1, M2=L
//   Direct-3 / Polyphase-3, M = 6 N2: N_DEC2=1, N_DEC3=1, M2=N2
//   Modified-Direct-1, M = 2 L1 2:    N_DEC2=1, M2=L1, FINAL_N=2
//   Modified-Direct-3, M = 2 N2 3:    N_DEC2=1, M2=N2, FINAL_N=3
//   Modified-Polyphase-1 / -3:        as above with POLYPHASE=1, FINAL_POLYPHASE=1
//   NR-CIC-1 / NR-CIC-2, M = 3^P:     N_DEC3=log3(M1), M2=M/M1
//   Polyphase-4, M = 3 L:             N_DEC3=1, POLYPHASE=1, M2=L
//
// CIC_D = 2 makes the CIC decimate by M2 with the comb delay of a 2*M2 CIC,
// which the corrected-1 structure uses to take its last factor of two after
// the corrector.
//
// Interface: in_valid/in_data input stream (one sample per enabled clock);
// out_valid pulses once per M input samples, a few clocks (one per stage)
// after the M-th. Output word WIN plus the growth of every stage, so the
// result is exact. Synchronous active-low reset.
//
// The stage chain, the structure family and the modified last stage follow
// the source; the generic parameterisation, the order /2 before /3 and the
// word widths are this design's own choices.
module two_stage_decimator
  import decim_pkg::*;
#(
  parameter int unsigned K         = 3,
  parameter int unsigned WIN       = 2,
  parameter int unsigned N_DEC2    = 2,
  parameter int unsigned N_DEC3    = 0,
  parameter bit          POLYPHASE = 1'b0,
  parameter int unsigned M2        = 128,
  parameter int unsigned CIC_D     = 1,
  parameter int unsigned FINAL_N   = 0,
  parameter int unsigned K_FINAL   = K,
  parameter bit          FINAL_POLYPHASE = 1'b0,
  parameter int unsigned WOUT      = WIN + N_DEC2 * growth_bits(2, K)
                                         + N_DEC3 * growth_bits(3, K)
                                         + growth_bits(M2 * CIC_D, K)
                                         + ((FINAL_N > 1) ? growth_bits(FINAL_N, K_FINAL) : 0)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [WIN-1:0]  in_data,
  output logic                   out_valid,
  output logic signed [WOUT-1:0] out_data
);

  localparam int unsigned NS = N_DEC2 + N_DEC3;

  // word width at the input of first-stage section i (i = NS: CIC input)
  function automatic int unsigned w_at(input int i);
    int unsigned w = WIN;
    for (int s = 0; s < i; s++)
      w += (s < int'(N_DEC2)) ? growth_bits(2, K) : growth_bits(3, K);
    return w;
  endfunction

  localparam int unsigned W_CIC_IN  = w_at(NS);
  localparam int unsigned W_CIC_OUT = W_CIC_IN + growth_bits(M2 * CIC_D, K);

  logic                      s_valid [NS+1];
  logic signed [WOUT-1:0]    s_data  [NS+1];

  assign s_valid[0] = in_valid;
  assign s_data[0]  = WOUT'(in_data);

  // ---------------- first stage: non-recursive comb chain ----------------
  for (genvar i = 0; i < int'(NS); i++) begin : g_nr
    localparam int unsigned NI = (i < int'(N_DEC2)) ? 2 : 3;
    localparam int unsigned WI = w_at(i);
    localparam int unsigned WO = w_at(i + 1);
    logic signed [WO-1:0] d;
    if (POLYPHASE) begin : g_pp
      polyphase_comb_stage #(.N(NI), .K(K), .WIN(WI), .WOUT(WO)) u_stage (
        .clk, .rst_n,
        .in_valid(s_valid[i]), .in_data(s_data[i][WI-1:0]),
        .out_valid(s_valid[i+1]), .out_data(d)
      );
    end else begin : g_df
      nr_comb_stage #(.N(NI), .K(K), .WIN(WI), .WOUT(WO)) u_stage (
        .clk, .rst_n,
        .in_valid(s_valid[i]), .in_data(s_data[i][WI-1:0]),
        .out_valid(s_valid[i+1]), .out_data(d)
      );
    end
    assign s_data[i+1] = WOUT'(d);
  end

  // ---------------- second stage: CIC ----------------
  logic                       c_valid;
  logic signed [W_CIC_OUT-1:0] c_data;

  cic_decimator #(.R(M2), .D(CIC_D), .K(K), .WIN(W_CIC_IN), .WOUT(W_CIC_OUT)) u_cic (
    .clk, .rst_n,
    .in_valid(s_valid[NS]), .in_data(s_data[NS][W_CIC_IN-1:0]),
    .out_valid(c_valid), .out_data(c_data)
  );

  // ---------------- optional last non-recursive stage (modified structures) ----
  if (FINAL_N > 1) begin : g_final
    logic signed [WOUT-1:0] f_data;
    if (FINAL_POLYPHASE) begin : g_pp
      polyphase_comb_stage #(.N(FINAL_N), .K(K_FINAL), .WIN(W_CIC_OUT), .WOUT(WOUT)) u_final (
        .clk, .rst_n,
        .in_valid(c_valid), .in_data(c_data),
        .out_valid, .out_data(f_data)
      );
    end else begin : g_df
      nr_comb_stage #(.N(FINAL_N), .K(K_FINAL), .WIN(W_CIC_OUT), .WOUT(WOUT)) u_final (
        .clk, .rst_n,
        .in_valid(c_valid), .in_data(c_data),
        .out_valid, .out_data(f_data)
      );
    end
    assign out_data = f_data;
  end else begin : g_nofinal
    assign out_valid = c_valid;
    assign out_data  = WOUT'(c_data);
  end

endmodule
