// tb_sc_counter: self-checking testbench of sc_counter.
//
// Drives random bit-streams with random enable for random window lengths,
// with a clear before each window, and compares the count with a count kept
// in the testbench. Also checks that clear wins over enable and that the
// count wraps only past 2^W - 1 (W = 6 here, so wrap is exercised).
module tb_sc_counter;
  localparam int W = 6;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, bit_in = 1'b0;
  logic [W-1:0] count;
  int checks = 0, failures = 0;
  int expected;

  sc_counter #(.W(W)) dut (.clk, .rst_n, .clr, .en, .bit_in, .count);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(count == 0, "reset value");
    rst_n = 1'b1;
    for (int w = 0; w < 200; w++) begin
      int len;
      @(negedge clk);
      clr = 1'b1; en = 1'b1; bit_in = 1'b1;  // clear must win
      @(negedge clk);
      clr = 1'b0;
      check(count == 0, "clear");
      expected = 0;
      len = 1 + ($urandom % 90);
      for (int t = 0; t < len; t++) begin
        en = ($urandom % 4) != 0;
        bit_in = $urandom % 2;
        if (en && bit_in) expected++;
        @(negedge clk);
        check(count == W'(expected), $sformatf("window %0d count %0d exp %0d", w, count, expected));
      end
      en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
