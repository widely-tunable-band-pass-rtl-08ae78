// sharpened_corrector: last stage of the corrected-2 structure.
//
// Runs at the output rate of the two-stage comb decimator and finishes the
// decimation by two. It cascades the simplest corrector C_1(z) with a
// sharpened version of H(z) = C_1(z) (1 + z^-1) / 64, using the sharpening
// polynomial 2H - H^2 (with the delay of H matched on the linear term):
//
//   G(z)   = C_1(z) (1 + z^-1)        = -3 -1 19 34 19 -1 -3   (gain 64)
//   S(z)   = 128 z^-3 G(z) - G(z)^2                            (gain 64^2)
//   out    = S(C_1(x)), then every second sample is kept.
//
// Because C_1 and the sharpening do not depend on the comb order K, this stage
// is the same for every K. The division by 64 of the sharpening polynomial is
// folded into the gain: all arithmetic is exact integer arithmetic, the gain
// 32 * 4096 stays in the word. All taps are shift-and-add constants.
//
// Interface: in_valid/in_data sample stream; out_valid pulses two clocks after
// every second accepted input (one clock in the C_1 filter, one here).
// Output word WIN + 6 + 15 bits. Synchronous active-low reset.
//
// The sharpening polynomial 2H - H^2 of C_1(1 + z^-1) follows the source; the
// z^-3 delay on the linear term, the integer scaling and the register
// placement are this design's own.
module sharpened_corrector
  import decim_pkg::*;
#(
  parameter int unsigned WIN  = 19,
  parameter int unsigned WOUT = WIN + coef_growth(corrector_coefs(1)) + 15
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [WIN-1:0]  in_data,
  output logic                   out_valid,
  output logic signed [WOUT-1:0] out_data
);

  localparam int unsigned WC = WIN + coef_growth(corrector_coefs(1));
  localparam int unsigned GT = 7;
  localparam int          GC [GT] = '{-3, -1, 19, 34, 19, -1, -3};

  logic                   c_valid;
  logic signed [WC-1:0]   c_data;

  corrector_filter #(.KC(1), .DEC(1), .WIN(WIN)) u_c1 (
    .clk, .rst_n, .in_valid, .in_data,
    .out_valid(c_valid), .out_data(c_data)
  );

  // y  : C_1 output history       (y[0] = current)
  // g1 : G applied to y, history  (g1[0] = current)
  logic signed [WOUT-1:0] y    [GT];
  logic signed [WOUT-1:0] yh   [GT-1];
  logic signed [WOUT-1:0] g1   [GT];
  logic signed [WOUT-1:0] g1h  [GT-1];
  logic signed [WOUT-1:0] g2, sharp;
  logic                   phase;

  always_comb begin
    y[0] = WOUT'(c_data);
    for (int j = 1; j < GT; j++) y[j] = yh[j-1];
    g1[0] = '0;
    for (int j = 0; j < GT; j++) g1[0] = g1[0] + WOUT'(mul_const(64'(y[j]), GC[j]));
    for (int j = 1; j < GT; j++) g1[j] = g1h[j-1];
    g2 = '0;
    for (int j = 0; j < GT; j++) g2 = g2 + WOUT'(mul_const(64'(g1[j]), GC[j]));
    sharp = (g1[3] <<< 7) - g2;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < GT - 1; j++) begin
        yh[j]  <= '0;
        g1h[j] <= '0;
      end
      phase     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (c_valid) begin
        for (int j = 0; j < GT - 1; j++) begin
          yh[j]  <= y[j];
          g1h[j] <= g1[j];
        end
        phase <= ~phase;
        if (phase) begin
          out_valid <= 1'b1;
          out_data  <= sharp;
        end
      end
    end
  end

endmodule
