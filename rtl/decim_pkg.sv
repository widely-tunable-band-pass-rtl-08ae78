// decim_pkg: constants and elaboration-time helpers shared by the comb-based
// decimator blocks.
//
// All decimators in this library carry full arithmetic precision: every stage
// widens its word by ceil(log2(sum |h|)) bits, where h is the stage's impulse
// response, so no stage can overflow and no rounding is done anywhere. The
// functions here compute those word growths, the coefficients of the
// non-recursive comb (1 + z^-1 + ... + z^-(N-1))^K, and the multiplierless
// corrector filters C_K(z) (K = 1..5) used by the corrected structures.
// Constant multiplications are written as explicit shift-and-add loops over the
// bits of the constant (mul_const), so no multiplier is ever inferred.
//
// The comb and corrector coefficients follow the source; full precision and
// the plain binary shift-and-add form (no subexpression sharing) are this
// design's own choices.
package decim_pkg;

  // Longest coefficient table any block needs: comb (N=3, K=5) has 11 taps,
  // corrector C_5 has 12 taps.
  localparam int unsigned MAX_TAPS = 16;

  typedef int coef_t [MAX_TAPS];

  // ceil(log2(v)) for a 64-bit value (v >= 1)
  function automatic int unsigned clog2_64(input longint unsigned v);
    int unsigned r = 0;
    longint unsigned p = 1;
    while (p < v) begin
      p = p << 1;
      r++;
    end
    return r;
  endfunction

  // Word growth of K cascaded boxcar filters of length n: ceil(log2(n^K)).
  function automatic int unsigned growth_bits(input int unsigned n, input int unsigned k);
    longint unsigned p = 1;
    for (int unsigned i = 0; i < k; i++) p = p * longint'(n);
    return clog2_64(p);
  endfunction

  // Coefficients of (1 + z^-1 + ... + z^-(n-1))^k, tap 0 first.
  function automatic coef_t comb_coefs(input int unsigned n, input int unsigned k);
    coef_t c, t;
    c = '{default: 0};
    c[0] = 1;
    for (int unsigned s = 0; s < k; s++) begin
      t = '{default: 0};
      for (int i = 0; i < MAX_TAPS; i++)
        for (int d = 0; d < int'(n); d++)
          if (i + d < MAX_TAPS) t[i+d] += c[i];
      c = t;
    end
    return c;
  endfunction

  function automatic int unsigned comb_taps(input int unsigned n, input int unsigned k);
    return k * (n - 1) + 1;
  endfunction

  // Corrector filters C_K(z), one per number K of cascaded comb filters.
  function automatic coef_t corrector_coefs(input int unsigned k);
    coef_t c = '{default: 0};
    case (k)
      1: begin
        c[0] = -3; c[1] = 2; c[2] = 17; c[3] = 17; c[4] = 2; c[5] = -3;
      end
      2: begin
        c[0] = 1; c[1] = -1; c[2] = -5; c[3] = 3; c[4] = 18;
        c[5] = 18; c[6] = 3; c[7] = -5; c[8] = -1; c[9] = 1;
      end
      3: begin
        c[0] = 1; c[1] = -1; c[2] = -6; c[3] = 2; c[4] = 21;
        c[5] = 21; c[6] = 2; c[7] = -6; c[8] = -1; c[9] = 1;
      end
      4: begin
        c[0] = 1; c[1] = 1; c[2] = -2; c[3] = -8; c[4] = 1; c[5] = 24;
        c[6] = 24; c[7] = 1; c[8] = -8; c[9] = -2; c[10] = 1; c[11] = 1;
      end
      default: begin // K = 5
        c[0] = 1; c[1] = 2; c[2] = -2; c[3] = -11; c[4] = 0; c[5] = 27;
        c[6] = 27; c[7] = 0; c[8] = -11; c[9] = -2; c[10] = 2; c[11] = 1;
      end
    endcase
    return c;
  endfunction

  function automatic int unsigned corrector_taps(input int unsigned k);
    case (k)
      1:       return 6;
      2, 3:    return 10;
      default: return 12;
    endcase
  endfunction

  // Word growth of an FIR filter: ceil(log2(sum |c|)).
  function automatic int unsigned coef_growth(input coef_t c);
    longint unsigned s = 0;
    int unsigned     a;
    for (int i = 0; i < MAX_TAPS; i++) begin
      a = (c[i] < 0) ? -c[i] : c[i];
      s = s + 64'(a);
    end
    return clog2_64(s);
  endfunction

  // Product of a signed word and a small integer constant, built only from
  // shifts and additions/subtractions (one adder per set bit of |c|).
  function automatic logic signed [63:0] mul_const(input logic signed [63:0] x,
                                                    input int c);
    logic signed [63:0] acc = '0;
    int unsigned mag = (c < 0) ? -c : c;
    for (int b = 0; b < 31; b++)
      if (mag[b]) acc = acc + (x <<< b);
    return (c < 0) ? -acc : acc;
  endfunction

endpackage
