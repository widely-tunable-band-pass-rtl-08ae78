// nr_comb_stage: one non-recursive comb decimation stage in direct form.
//
// Filters the input with K cascaded boxcar sections
// (1 + z^-1 + ... + z^-(N-1)) running at the input rate and keeps every N-th
// result, i.e. H(z) = (sum_{d<N} z^-d)^K followed by a down-sampler by N.
// N = 2 is the classic (1 + z^-1)^K stage of the power-of-two non-recursive
// comb; N = 3 is the (1 + z^-1 + z^-2)^K stage used for factors that are
// powers or multiples of three. Chaining these stages gives the first
// (non-recursive) stage of the two-stage decimator.
//
// Each section holds its last N-1 inputs; the sums of all sections are formed
// combinationally from the current input, so the kept output contains the
// N-th input of its group. The output word is WIN + ceil(log2(N^K)) bits,
// enough for any input (no scaling by 1/N^K is done; the gain stays in the
// word).
//
// Interface: in_valid/in_data is a sample stream at any rate (one sample per
// cycle at most). out_valid pulses for one cycle, one clock after every N-th
// accepted input; out_data holds its value until the next output. The
// decimation phase counter is this design's rate divider: the stage that
// follows runs on out_valid as its clock enable. Synchronous active-low reset
// clears all state.
//
// The direct-form comb stage follows the source; the choice of kept sample,
// the valid-strobe interface and the word widths are this design's own.
module nr_comb_stage
  import decim_pkg::*;
#(
  parameter int unsigned N    = 2,
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

  logic signed [WOUT-1:0] hist [K][N-1];   // previous inputs of each section
  logic signed [WOUT-1:0] sec  [K+1];      // section inputs/outputs, current sample
  logic [$clog2(N)-1:0]   phase;

  always_comb begin
    sec[0] = WOUT'(in_data);
    for (int s = 0; s < int'(K); s++) begin
      sec[s+1] = sec[s];
      for (int d = 0; d < int'(N) - 1; d++) sec[s+1] = sec[s+1] + hist[s][d];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(K); s++)
        for (int d = 0; d < int'(N) - 1; d++) hist[s][d] <= '0;
      phase     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int s = 0; s < int'(K); s++) begin
          hist[s][0] <= sec[s];
          for (int d = 1; d < int'(N) - 1; d++) hist[s][d] <= hist[s][d-1];
        end
        if (phase == ($clog2(N))'(N - 1)) begin
          phase     <= '0;
          out_valid <= 1'b1;
          out_data  <= sec[K];
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

endmodule
