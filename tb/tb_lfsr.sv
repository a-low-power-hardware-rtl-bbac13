// tb_lfsr: self-checking testbench of lfsr.
//
// Runs the 18-bit LFSR with the x^18 + x^11 + 1 polynomial and a 10-bit one
// with x^10 + x^7 + 1. A reference shift register written out in this file,
// with the taps spelled out by hand, must match the design state every cycle;
// the 18-bit design must return to its seed after exactly 2^18 - 1 steps,
// never reach zero, and visit every non-zero value once (checked with a
// visited bitmap), and the 10-bit one must have period 2^10 - 1. It also
// checks that en low holds the state.
module tb_lfsr;
  localparam int N = 18;
  localparam int PERIOD = (1 << N) - 1;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [N-1:0] s1, ref1;
  logic [9:0]   s2, ref2;
  int checks = 0, failures = 0;
  bit seen [1 << N];

  lfsr #(.N(N), .TAPS(izh_pkg::lfsr_taps(N)), .SEED(32'h1))  dut1 (.clk, .rst_n, .en, .state(s1));
  lfsr #(.N(10), .TAPS(izh_pkg::lfsr_taps(10)), .SEED(32'h2B5)) dut2 (.clk, .rst_n, .en, .state(s2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int distinct;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    ref1 = 18'h1;
    ref2 = 10'h2B5;
    @(negedge clk);
    check(s1 == ref1 && s2 == ref2, "seed after reset");
    // en low: state must hold
    repeat (5) @(negedge clk);
    check(s1 == ref1 && s2 == ref2, "hold with en low");
    en = 1'b1;
    distinct = 0;
    for (int k = 0; k < PERIOD; k++) begin
      if (!seen[s1]) distinct++;
      seen[s1] = 1'b1;
      check(s1 != '0, "state zero");
      @(negedge clk);
      ref1 = {ref1[N-2:0], ref1[17] ^ ref1[10]};
      ref2 = {ref2[8:0], ref2[9] ^ ref2[6]};
      if (k % 1023 == 1022) check(s2 == 10'h2B5, $sformatf("lfsr2 back at seed after %0d", k + 1));
      else check(s2 != 10'h2B5, $sformatf("lfsr2 early repeat at %0d", k + 1));
      if (k < 4000 || k > PERIOD - 10) begin
        check(s1 == ref1, $sformatf("lfsr1 step %0d", k));
        check(s2 == ref2, $sformatf("lfsr2 step %0d", k));
      end
    end
    check(distinct == PERIOD, $sformatf("distinct states %0d", distinct));
    check(s1 == 18'h1, "lfsr1 period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
