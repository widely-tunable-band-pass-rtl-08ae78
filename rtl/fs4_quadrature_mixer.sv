// fs4_quadrature_mixer: digital down-conversion of a band-pass sigma-delta
// stream centred at fs/4 to baseband I and Q streams.
//
// At a notch frequency of fs/4 the oscillator sequences are
// cos(pi n / 2) = 1, 0, -1, 0 and -sin(pi n / 2) = 0, -1, 0, 1, so the two
// mixers reduce to passing, zeroing or negating the input sample; a two-bit
// phase counter plays the role of the numerically controlled oscillator.
// I[n] = x[n] cos(pi n/2), Q[n] = -x[n] sin(pi n/2) (multiplication by
// e^{-j pi n/2}). The two outputs feed two identical low-pass decimators.
//
// Interface: in_valid/in_data is the modulator output code (two's complement,
// WIN bits); the oscillator phase advances on every accepted sample.
// out_valid, i_data and q_data follow one clock later; the words are one bit
// wider so that the negated most negative code fits. Synchronous active-low
// reset sets the oscillator phase to 0.
//
// Mixing with +1, 0, -1 sequences at fs/4 follows the source; the sign of Q,
// the one-bit-wider two's complement negation (instead of XOR gates) and the
// output register are this design's own choices.
module fs4_quadrature_mixer #(
  parameter int unsigned WIN = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [WIN-1:0] in_data,
  output logic                  out_valid,
  output logic signed [WIN:0]   i_data,
  output logic signed [WIN:0]   q_data
);

  logic [1:0]          nco_phase;
  logic signed [WIN:0] x;

  assign x = (WIN+1)'(in_data);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nco_phase <= 2'd0;
      out_valid <= 1'b0;
      i_data    <= '0;
      q_data    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        nco_phase <= nco_phase + 2'd1;
        unique case (nco_phase)
          2'd0: begin i_data <= x;  q_data <= '0; end
          2'd1: begin i_data <= '0; q_data <= -x; end
          2'd2: begin i_data <= -x; q_data <= '0; end
          2'd3: begin i_data <= '0; q_data <= x;  end
        endcase
      end
    end
  end

endmodule
