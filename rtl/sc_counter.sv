// sc_counter: stochastic-to-binary converter.
//
// Counts the 1s of a bit-stream. clr sets the count to zero (and wins over
// en); while en is high, each clock adds bit_in. After a window of L clocks
// the count is L times the stream's density, i.e. the binary value of the
// stochastic number scaled by L. W must hold L (N+1 bits for L = 2^N).
// A plain up-counter is the converter the design calls for; its width and the
// synchronous clear are choices of this design.
module sc_counter #(
  parameter int W = 19
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         bit_in,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            count <= '0;
    else if (clr)          count <= '0;
    else if (en && bit_in) count <= count + 1'b1;
  end

endmodule
