// izh_neuron_sc: Izhikevich spiking neuron whose 0.04 v^2 term is computed by
// stochastic computing.
//
// The neuron keeps its membrane potential v and recovery variable u in
// registers and advances them by one forward-Euler step of dt = 2^-DT_SHIFT ms
// at a time. For each step the stochastic squarer (sc_multiplier: two LFSRs,
// two stochastic number generators, an AND gate and a counter) squares |v| in
// an SC_N-bit word over 2^SC_N clocks; izh_datapath then de-normalises the
// count into 0.04 v^2, adds the linear terms and the input current, updates u,
// and applies the after-spike reset when v has reached 30 mV. Replacing the
// v^2 multiplier with the stochastic squarer is what saves area and power;
// the price is the squarer's error and its 2^SC_N-clock latency.
//
// Interface
//   en         keep stepping while high (checked between steps)
//   load       while idle, load v_init / u_init into the state
//   i_in, c, d signed, INT_BITS integer + STATE_FRAC fractional bits (mV units)
//   a, b       signed, 2 integer + COEF_FRAC fractional bits
//   v, u       present state, same format as i_in
//   spike      one-cycle pulse at the end of a step that applied the reset
//   step_done  one-cycle pulse when v and u take a new value
// Timing: one step takes 2^SC_N + 2 clocks (one to start the squarer, 2^SC_N
// of stochastic counting, one to write the state). Reset puts v at V0_MV and
// u at U0_MV (mV), the usual resting start of the model; the start values,
// dt, the sequencing and the state formats are this design's choices.
module izh_neuron_sc #(
  parameter int INT_BITS   = izh_pkg::INT_BITS_DEFAULT,
  parameter int SC_N       = izh_pkg::SC_N_DEFAULT,
  parameter int STATE_FRAC = izh_pkg::STATE_FRAC_DEFAULT,
  parameter int COEF_FRAC  = izh_pkg::COEF_FRAC_DEFAULT,
  parameter int DT_SHIFT   = izh_pkg::DT_SHIFT_DEFAULT,
  parameter int V0_MV      = -65,
  parameter int U0_MV      = -13,
  localparam int SW = INT_BITS + STATE_FRAC,
  localparam int CW = COEF_FRAC + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 load,
  input  logic signed [SW-1:0] v_init,
  input  logic signed [SW-1:0] u_init,
  input  logic signed [SW-1:0] i_in,
  input  logic signed [CW-1:0] a,
  input  logic signed [CW-1:0] b,
  input  logic signed [SW-1:0] c,
  input  logic signed [SW-1:0] d,
  output logic signed [SW-1:0] v,
  output logic signed [SW-1:0] u,
  output logic                 spike,
  output logic                 step_done
);

  typedef enum logic {S_IDLE, S_SQUARE} state_t;
  state_t state;

  logic            sq_start, sq_busy, sq_done;
  logic [SC_N-1:0] v_mag;
  logic [SC_N:0]   sq_count;
  logic signed [SW-1:0] v_next, u_next;
  logic            fired;

  assign sq_start = (state == S_IDLE) && en && !load;

  sc_multiplier #(.N(SC_N)) u_square (
    .clk, .rst_n,
    .start  (sq_start),
    .x1     (v_mag),
    .x2     (v_mag),
    .busy   (sq_busy),
    .done   (sq_done),
    .product(sq_count)
  );

  izh_datapath #(
    .INT_BITS(INT_BITS), .SC_N(SC_N), .STATE_FRAC(STATE_FRAC),
    .COEF_FRAC(COEF_FRAC), .DT_SHIFT(DT_SHIFT)
  ) u_dp (
    .v, .u, .i_in, .a, .b, .c, .d,
    .sq_count, .v_mag, .v_next, .u_next, .fired
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      v         <= SW'(longint'(V0_MV) <<< STATE_FRAC);
      u         <= SW'(longint'(U0_MV) <<< STATE_FRAC);
      spike     <= 1'b0;
      step_done <= 1'b0;
    end else begin
      spike     <= 1'b0;
      step_done <= 1'b0;
      start_when_idle: assert (!(sq_start && sq_busy)) else $error("izh_neuron_sc: squarer started while busy");
      case (state)
        S_IDLE: begin
          if (load) begin
            v <= v_init;
            u <= u_init;
          end else if (en) begin
            state <= S_SQUARE;
          end
        end
        S_SQUARE: begin
          if (sq_done) begin
            v         <= v_next;
            u         <= u_next;
            spike     <= fired;
            step_done <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
