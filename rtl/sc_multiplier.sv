// sc_multiplier: stochastic multiplier (squarer when x1 = x2).
//
// Two stochastic number generators, each driven by its own LFSR, turn the
// N-bit unsigned operands x1 and x2 into bit-streams of density x1/2^N and
// x2/2^N. An AND gate multiplies the two streams (for independent streams
// P(a & b) = P(a) * P(b)), and a counter converts the product stream back to
// binary over a window of 2^N clocks. The result
//     product ~= x1 * x2 / 2^N
// is the product of the operands as fractions, scaled by 2^N. Using two LFSRs
// rather than one shared LFSR follows the design. How they are decorrelated
// is this design's choice: both use the same maximal-length polynomial, the
// second starts LFSR2_AHEAD steps ahead of the first, and SNG2 reads the
// second LFSR's state with its bits in reverse order. For a square (x1 = x2)
// this keeps the count within about 2 % of x^2 / 2^N for N = 17 .. 20 over
// the neuron's working range (much less for |v| >= 30 mV); a pair of
// reciprocal polynomials would be off by up to 8 %. At N = 15 and 16
// the error grows to tens of percent.
//
// Handshake: a one-cycle start while idle (busy low) latches x1 and x2 and
// clears the counter. The unit then counts for exactly 2^N clocks and raises
// done for one cycle; product is valid from that cycle until the next start.
// Start-to-done latency is 2^N clocks. A start while busy is ignored.
// The LFSRs advance only while counting and are not reseeded between
// operations.
module sc_multiplier #(
  parameter int          N     = 18,
  parameter logic [31:0] SEED1       = 32'h1,
  parameter int          LFSR2_AHEAD = 1000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] x1,
  input  logic [N-1:0] x2,
  output logic         busy,
  output logic         done,
  output logic [N:0]   product
);

  logic [N-1:0] x1_q, x2_q;
  localparam logic [31:0] TAPS  = izh_pkg::lfsr_taps(N);
  localparam logic [31:0] SEED2 = izh_pkg::lfsr_advance(N, TAPS, SEED1, LFSR2_AHEAD);

  logic [N-1:0] r1, r2, r2_rev;
  logic [N-1:0] cyc;
  logic         s1, s2, s_and;
  logic         go;

  assign go = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cyc  <= '0;
      x1_q <= '0;
      x2_q <= '0;
    end else begin
      done <= 1'b0;
      done_after_busy: assert (!(done && busy)) else $error("sc_multiplier: done while busy");
      if (go) begin
        busy <= 1'b1;
        cyc  <= '0;
        x1_q <= x1;
        x2_q <= x2;
      end else if (busy) begin
        cyc <= cyc + 1'b1;
        if (cyc == '1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  lfsr #(.N(N), .TAPS(TAPS), .SEED(SEED1)) u_lfsr1 (
    .clk, .rst_n, .en(busy), .state(r1));
  lfsr #(.N(N), .TAPS(TAPS), .SEED(SEED2)) u_lfsr2 (
    .clk, .rst_n, .en(busy), .state(r2));

  // SNG2 sees the second LFSR with its bit order reversed (wiring only).
  always_comb
    for (int k = 0; k < N; k++) r2_rev[k] = r2[N-1-k];

  sng #(.N(N)) u_sng1 (.x(x1_q), .r(r1),     .bit_out(s1));
  sng #(.N(N)) u_sng2 (.x(x2_q), .r(r2_rev), .bit_out(s2));

  // Unipolar stochastic multiplication: a single AND gate.
  assign s_and = s1 & s2;

  sc_counter #(.W(N+1)) u_s2b (
    .clk, .rst_n, .clr(go), .en(busy), .bit_in(s_and), .count(product));

endmodule
