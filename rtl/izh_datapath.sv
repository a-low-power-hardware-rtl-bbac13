// izh_datapath: one forward-Euler step of the Izhikevich neuron.
//
//   dv/dt = 0.04 v^2 + 5 v + 140 - u + I        dv/dt, du/dt per ms
//   du/dt = a (b v - u)
//   if v >= 30 mV: v <- c, u <- u + d
//
// The 0.04 v^2 term is not computed here with a multiplier: it comes from the
// stochastic squarer as sq_count, the count of 1s in a 2^SC_N-clock product
// stream of |v| with itself. v_mag is the squarer's operand: |v| truncated to
// the SC word (INT_BITS integer, SC_N - INT_BITS fractional bits). Read as a
// fraction |v| / 2^INT_BITS, the squarer returns
//   sq_count ~= 2^SC_N * v^2 / 2^(2 INT_BITS),
// and this block de-normalises it and applies the 0.04 factor with one
// constant multiplication (KSQ, a shift-and-add constant):
//   0.04 v^2 = sq_count * 0.04 * 2^(2 INT_BITS - SC_N).
// 5v is a shift and an add; a (b v - u) uses two multipliers by the run-time
// coefficients a and b. The time step is dt = 2^-DT_SHIFT ms, applied as an
// arithmetic shift. Results are saturated to the state range.
//
// The firing test looks at the present v: a step that starts with v >= 30 mV
// applies the reset of eq. (2) instead of the integration. The equations,
// the threshold and the reset follow the design; the Euler scheme, dt, the
// state and coefficient formats and the saturation are choices of this one.
//
// Purely combinational. Formats: v, u, i_in, c, d are signed with INT_BITS
// integer and STATE_FRAC fractional bits; a, b are signed with 2 integer and
// COEF_FRAC fractional bits.
module izh_datapath #(
  parameter int INT_BITS   = izh_pkg::INT_BITS_DEFAULT,
  parameter int SC_N       = izh_pkg::SC_N_DEFAULT,
  parameter int STATE_FRAC = izh_pkg::STATE_FRAC_DEFAULT,
  parameter int COEF_FRAC  = izh_pkg::COEF_FRAC_DEFAULT,
  parameter int DT_SHIFT   = izh_pkg::DT_SHIFT_DEFAULT,
  localparam int SW = INT_BITS + STATE_FRAC,
  localparam int CW = COEF_FRAC + 2
) (
  input  logic signed [SW-1:0] v,
  input  logic signed [SW-1:0] u,
  input  logic signed [SW-1:0] i_in,
  input  logic signed [CW-1:0] a,
  input  logic signed [CW-1:0] b,
  input  logic signed [SW-1:0] c,
  input  logic signed [SW-1:0] d,
  input  logic        [SC_N:0] sq_count,
  output logic      [SC_N-1:0] v_mag,
  output logic signed [SW-1:0] v_next,
  output logic signed [SW-1:0] u_next,
  output logic                 fired
);

  localparam int SC_FRAC = SC_N - INT_BITS;
  localparam int KS      = 16;
  // 0.04 * 2^(2*INT_BITS - SC_N) in STATE_FRAC units, scaled by 2^KS.
  localparam longint KSQ = longint'(0.04 * (2.0 ** (KS + INT_BITS - SC_FRAC + STATE_FRAC)));

  localparam longint SMAX = (longint'(1) <<< (SW - 1)) - 1;
  localparam longint SMIN = -(longint'(1) <<< (SW - 1));
  localparam longint MAGMAX = (longint'(1) <<< SC_N) - 1;

  function automatic logic signed [SW-1:0] sat(input logic signed [63:0] x);
    if (x > SMAX)      return SW'(SMAX);
    else if (x < SMIN) return SW'(SMIN);
    else               return SW'(x);
  endfunction

  typedef logic signed [63:0] wide_t;
  wide_t vl, ul, mag, sq, dv, bv, du, v_int, u_int;

  always_comb begin
    vl  = wide_t'(v);
    ul  = wide_t'(u);

    // Operand for the stochastic squarer.
    mag = ((vl < 0) ? -vl : vl) >>> (STATE_FRAC - SC_FRAC);
    v_mag = (mag > MAGMAX) ? SC_N'(MAGMAX) : SC_N'(mag);

    // De-normalised squaring term 0.04 v^2.
    sq = (wide_t'(sq_count) * KSQ) >>> KS;

    dv = sq + (vl <<< 2) + vl + (wide_t'(140) <<< STATE_FRAC) - ul + wide_t'(i_in);
    bv = (wide_t'(b) * vl) >>> COEF_FRAC;
    du = (wide_t'(a) * (bv - ul)) >>> COEF_FRAC;

    v_int = vl + (dv >>> DT_SHIFT);
    u_int = ul + (du >>> DT_SHIFT);

    fired = (vl >= (wide_t'(izh_pkg::V_PEAK_MV) <<< STATE_FRAC));
    if (fired) begin
      v_next = c;
      u_next = sat(ul + wide_t'(d));
    end else begin
      v_next = sat(v_int);
      u_next = sat(u_int);
    end
  end

  initial assert (STATE_FRAC >= SC_FRAC && SC_FRAC >= 0)
    else $error("izh_datapath: need 0 <= SC_N - INT_BITS <= STATE_FRAC");

endmodule
