// corrector_filter: multiplierless comb-droop corrector C_K(z).
//
// A short symmetric FIR filter whose coefficients are small integers (sums of
// powers of two), chosen by the number K of cascaded comb filters it
// compensates (K = 1..5). It runs at the low rate after the comb stages
// (M/2 times below the input rate), flattens the passband droop of the combs
// and raises the attenuation of the odd folding bands. C_3 is
// 1 -1 -6 2 21 21 2 -6 -1 1 and widens the word by 6 bits.
//
// Every product is built from shifts and adds (decim_pkg::mul_const); no
// multiplier is used. DEC = 2 keeps every second result, which is the final
// down-sampler by two of the corrected-1 structure; DEC = 1 keeps all of them.
// The kept output contains the current input.
//
// Interface: in_valid/in_data sample stream; out_valid pulses one clock after
// every DEC-th accepted input. Output word WIN + ceil(log2(sum |c|)) bits; the
// filter gain (sum of the coefficients, 32 or 34) stays in the word.
// Synchronous active-low reset clears the delay line.
//
// The coefficients follow the source's corrector table. The direct-form delay
// line, the decimation option and the word widths are this design's own.
module corrector_filter
  import decim_pkg::*;
#(
  parameter int unsigned KC   = 3,
  parameter int unsigned DEC  = 2,
  parameter int unsigned WIN  = 29,
  parameter int unsigned WOUT = WIN + coef_growth(corrector_coefs(KC))
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [WIN-1:0]  in_data,
  output logic                   out_valid,
  output logic signed [WOUT-1:0] out_data
);

  localparam int unsigned TAPS = corrector_taps(KC);
  localparam coef_t       C    = corrector_coefs(KC);
  localparam int unsigned PW   = (DEC > 1) ? $clog2(DEC) : 1;

  logic signed [WIN-1:0]  xs   [TAPS];
  logic signed [WIN-1:0]  hist [TAPS-1];
  logic signed [WOUT-1:0] acc;
  logic [PW-1:0]          phase;

  always_comb begin
    xs[0] = in_data;
    for (int j = 1; j < int'(TAPS); j++) xs[j] = hist[j-1];
    acc = '0;
    for (int j = 0; j < int'(TAPS); j++)
      acc = acc + WOUT'(mul_const(64'(xs[j]), C[j]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(TAPS) - 1; j++) hist[j] <= '0;
      phase     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int j = 0; j < int'(TAPS) - 1; j++) hist[j] <= xs[j];
        if (phase == PW'(DEC - 1)) begin
          phase     <= '0;
          out_valid <= 1'b1;
          out_data  <= acc;
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

endmodule
