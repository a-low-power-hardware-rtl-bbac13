// izh_pkg: shared constants and helper functions of the stochastic-computing
// Izhikevich neuron.
//
// Number formats
//   * SC word: the stochastic squarer works on an n-bit unsigned magnitude with
//     INT_BITS = 10 integer bits and n - 10 fractional bits; n = 18 is the
//     default word length (8 fractional bits), the point where area, power and
//     error balance best.
//   * Neuron state (v, u, I, c, d): signed fixed point with INT_BITS integer
//     bits (sign included) and STATE_FRAC fractional bits. The wider fraction
//     of the state is a choice of this design; it keeps the small per-step
//     changes of u from being rounded away.
//   * Coefficients a and b: signed fixed point with COEF_FRAC fractional bits.
//
// lfsr_taps() returns the feedback mask of a maximal-length Fibonacci LFSR of
// width 4..24 (bit k of the mask set means state bit k feeds the XOR).
// lfsr_advance() returns the state an LFSR reaches from a seed after a given
// number of steps; the squarer uses it to start its second LFSR at a fixed
// distance ahead of the first.
package izh_pkg;

  localparam int INT_BITS_DEFAULT   = 10;
  localparam int SC_N_DEFAULT       = 18;
  localparam int STATE_FRAC_DEFAULT = 16;
  localparam int COEF_FRAC_DEFAULT  = 16;
  localparam int DT_SHIFT_DEFAULT   = 4;   // dt = 2^-4 ms
  localparam int V_PEAK_MV          = 30;  // spike threshold of eq. (2)

  // Polynomial x^n + sum(x^t) + 1, given as tap list n, t1, t2, t3 (0 = none).
  function automatic logic [31:0] lfsr_taps(input int n);
    int t [4];
    logic [31:0] m;
    case (n)
      4:  t = '{4, 3, 0, 0};
      5:  t = '{5, 3, 0, 0};
      6:  t = '{6, 5, 0, 0};
      7:  t = '{7, 6, 0, 0};
      8:  t = '{8, 6, 5, 4};
      9:  t = '{9, 5, 0, 0};
      10: t = '{10, 7, 0, 0};
      11: t = '{11, 9, 0, 0};
      12: t = '{12, 6, 4, 1};
      13: t = '{13, 4, 3, 1};
      14: t = '{14, 5, 3, 1};
      15: t = '{15, 14, 0, 0};
      16: t = '{16, 15, 13, 4};
      17: t = '{17, 14, 0, 0};
      18: t = '{18, 11, 0, 0};
      19: t = '{19, 6, 2, 1};
      20: t = '{20, 17, 0, 0};
      21: t = '{21, 19, 0, 0};
      22: t = '{22, 21, 0, 0};
      23: t = '{23, 18, 0, 0};
      default: t = '{24, 23, 22, 17};
    endcase
    m = '0;
    m[t[0]-1] = 1'b1;
    for (int k = 1; k < 4; k++)
      if (t[k] != 0) m[t[k]-1] = 1'b1;
    return m;
  endfunction

  function automatic logic [31:0] lfsr_advance(input int n, input logic [31:0] taps,
                                               input logic [31:0] seed, input int steps);
    logic [31:0] s;
    logic        fb;
    s = seed;
    for (int i = 0; i < steps; i++) begin
      fb = 1'b0;
      for (int k = 0; k < n; k++)
        if (taps[k]) fb ^= s[k];
      s = ((s << 1) | 32'(fb)) & ((32'd1 << n) - 1);
    end
    return s;
  endfunction

endpackage
