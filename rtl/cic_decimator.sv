// cic_decimator: recursive comb (CIC, cascaded integrator-comb) decimator, the
// second stage of the two-stage decimator.
//
// H(z) = ((1 - z^-(R*D)) / (1 - z^-1))^K followed by a down-sampler by R:
// K integrators run at the input rate, every R-th integrator output is kept,
// and K comb sections with a differential delay of D low-rate samples follow.
// D = 1 is the plain CIC decimating by R. D = 2 gives the CIC part of a
// structure decimating by 2R whose last factor of two is taken after a
// low-rate filter (the corrector of the corrected-1 structure).
//
// The integrators wrap around in two's complement; because the output word has
// WIN + ceil(log2((R*D)^K)) bits the wrap cancels in the combs and the result
// is exact. The integrator update is formed combinationally, so the kept sample
// includes the R-th input of its group.
//
// Interface: in_valid/in_data sample stream; out_valid pulses one clock after
// every R-th accepted input. Synchronous active-low reset clears integrators,
// comb delay lines and the decimation counter.
//
// The CIC itself is the classic structure the source builds on; the
// differential delay option, the wrap-around arithmetic and the output
// register are this design's own choices.
module cic_decimator
  import decim_pkg::*;
#(
  parameter int unsigned R    = 128,
  parameter int unsigned D    = 1,
  parameter int unsigned K    = 3,
  parameter int unsigned WIN  = 14,
  parameter int unsigned WOUT = WIN + growth_bits(R * D, K)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [WIN-1:0]  in_data,
  output logic                   out_valid,
  output logic signed [WOUT-1:0] out_data
);

  localparam int unsigned CW = (R > 1) ? $clog2(R) : 1;

  logic signed [WOUT-1:0] integ     [K];
  logic signed [WOUT-1:0] integ_nxt [K];
  logic signed [WOUT-1:0] comb_dly  [K][D];
  logic signed [WOUT-1:0] comb      [K+1];
  logic [CW-1:0]          phase;

  always_comb begin
    integ_nxt[0] = integ[0] + WOUT'(in_data);
    for (int k = 1; k < int'(K); k++) integ_nxt[k] = integ[k] + integ_nxt[k-1];
    comb[0] = integ_nxt[K-1];
    for (int k = 0; k < int'(K); k++) comb[k+1] = comb[k] - comb_dly[k][D-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(K); k++) begin
        integ[k] <= '0;
        for (int d = 0; d < int'(D); d++) comb_dly[k][d] <= '0;
      end
      phase     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int k = 0; k < int'(K); k++) integ[k] <= integ_nxt[k];
        if (phase == CW'(R - 1)) begin
          phase     <= '0;
          out_valid <= 1'b1;
          out_data  <= comb[K];
          for (int k = 0; k < int'(K); k++) begin
            comb_dly[k][0] <= comb[k];
            for (int d = 1; d < int'(D); d++) comb_dly[k][d] <= comb_dly[k][d-1];
          end
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

endmodule
