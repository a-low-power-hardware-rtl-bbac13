// lfsr: maximal-length Fibonacci linear feedback shift register.
//
// It is the random source of one stochastic number generator. Each enabled
// clock the register shifts left by one and the XOR of the bits selected by
// TAPS enters at bit 0. With a maximal-length TAPS mask (see izh_pkg::lfsr_taps)
// the state walks through all 2^N - 1 non-zero values before repeating, so over
// one period every value 1 .. 2^N-1 appears exactly once.
//
// Interface: en advances the register; state is the current value, read as an
// N-bit unsigned random number. Reset loads SEED, which must be non-zero.
// The polynomials and seeds are choices of this design; the squarer only
// requires two separate LFSRs.
module lfsr #(
  parameter int          N    = 18,
  parameter logic [31:0] TAPS = izh_pkg::lfsr_taps(18),
  parameter logic [31:0] SEED = 32'h1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] state
);

  logic fb;

  always_comb begin
    fb = 1'b0;
    for (int k = 0; k < N; k++)
      if (TAPS[k]) fb ^= state[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED[N-1:0];
    else if (en) state <= {state[N-2:0], fb};
  end

  initial assert (SEED[N-1:0] != '0) else $error("lfsr: SEED must be non-zero");

endmodule
