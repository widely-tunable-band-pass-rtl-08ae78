// polyphase_comb_stage: one non-recursive comb decimation stage in polyphase
// form.
//
// Same transfer function as nr_comb_stage, H(z) = (sum_{d<N} z^-d)^K followed
// by a down-sampler by N, but the filter is evaluated only for the samples
// that are kept: the input samples are distributed over the N polyphase
// branches (a commutator shift register) and the weighted sum
// y[m] = sum_j h[j] * x[mN + N-1 - j] is formed once per N inputs. The taps
// h[j] are the binomial-like coefficients of the comb polynomial
// (for N = 2, K = 3: 1 3 3 1; for N = 3, K = 3: 1 3 6 7 6 3 1), computed at
// elaboration. Each product is a constant multiplication made of shifts and
// adds, so the adders work at the low output rate, which is where the power
// saving of the polyphase structures comes from.
//
// Interface and timing as nr_comb_stage: out_valid pulses one clock after
// every N-th accepted input; output word WIN + ceil(log2(N^K)) bits.
// Synchronous active-low reset clears the commutator.
//
// The polyphase decomposition of the comb follows the source; the branch
// arrangement and the adder structure (binary coefficients, no subexpression
// sharing) are this design's own.
module polyphase_comb_stage
  import decim_pkg::*;
#(
  parameter int unsigned N    = 3,
  parameter int unsigned K    = 3,
  parameter int unsigned WIN  = 2,
  parameter int unsigned WOUT = WIN + growth_bits(N, K)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [WIN-1:0]  in_data,
  output logic                   out_valid,
  output logic signed [WOUT-1:0] out_data
);

  localparam int unsigned TAPS = comb_taps(N, K);
  localparam coef_t       H    = comb_coefs(N, K);

  logic signed [WIN-1:0]  xs [TAPS];   // xs[0] = current input, xs[j] = x[n-j]
  logic signed [WIN-1:0]  hist [TAPS-1];
  logic signed [WOUT-1:0] acc;
  logic [$clog2(N)-1:0]   phase;

  always_comb begin
    xs[0] = in_data;
    for (int j = 1; j < int'(TAPS); j++) xs[j] = hist[j-1];
    acc = '0;
    for (int j = 0; j < int'(TAPS); j++)
      acc = acc + WOUT'(mul_const(64'(xs[j]), H[j]));
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
        if (phase == ($clog2(N))'(N - 1)) begin
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
