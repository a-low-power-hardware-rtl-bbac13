// tb_sc_multiplier: self-checking testbench of sc_multiplier.
//
// Two instances: N = 10 for many operations and the default N = 18 for a few.
// For every operation the testbench runs its own copy of the two LFSRs (taps
// written out by hand: x^10+x^7+1 and x^18+x^11+1; the second LFSR starts
// 1000 steps ahead of the first and is read bit-reversed) and of the SNG
// comparisons and AND gate, so the product count must match exactly. Independently of that it checks that the product is close to
// x1 * x2 / 2^N (the stochastic estimate), that done comes exactly 2^N clocks
// after start, that busy is high in between, and that a start while busy is
// ignored. Operands include squares (x1 = x2), as the neuron uses.
module tb_sc_multiplier;
  localparam int NA = 10;
  localparam int NB = 18;

  logic clk = 1'b0, rst_n = 1'b0;
  logic startA = 1'b0, startB = 1'b0;
  logic [NA-1:0] xa1, xa2;
  logic [NB-1:0] xb1, xb2;
  logic busyA, doneA, busyB, doneB;
  logic [NA:0] prodA;
  logic [NB:0] prodB;
  int checks = 0, failures = 0;

  logic [NA-1:0] ra1, ra2;
  logic [NB-1:0] rb1, rb2;

  function automatic logic [NA-1:0] rev_a(input logic [NA-1:0] x);
    for (int k = 0; k < NA; k++) rev_a[k] = x[NA-1-k];
  endfunction
  function automatic logic [NB-1:0] rev_b(input logic [NB-1:0] x);
    for (int k = 0; k < NB; k++) rev_b[k] = x[NB-1-k];
  endfunction

  sc_multiplier #(.N(NA)) dutA (.clk, .rst_n, .start(startA), .x1(xa1), .x2(xa2),
                                .busy(busyA), .done(doneA), .product(prodA));
  sc_multiplier dutB (.clk, .rst_n, .start(startB), .x1(xb1), .x2(xb2),
                      .busy(busyB), .done(doneB), .product(prodB));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_a(input int x1, input int x2);
    int expected, lat;
    real est;
    expected = 0;
    for (int t = 0; t < (1 << NA); t++) begin
      if ((x1 > ra1) && (x2 > rev_a(ra2))) expected++;
      ra1 = {ra1[NA-2:0], ra1[9] ^ ra1[6]};
      ra2 = {ra2[NA-2:0], ra2[9] ^ ra2[6]};
    end
    @(negedge clk);
    xa1 = NA'(x1); xa2 = NA'(x2); startA = 1'b1;
    @(negedge clk);
    startA = 1'b0;
    xa1 = '0; xa2 = '0;             // operands must have been latched
    lat = 0;
    check(busyA, "busy after start");
    // a second start while busy is ignored
    startA = 1'b1; xa1 = '1; xa2 = '1;
    @(negedge clk);
    startA = 1'b0;
    lat++;
    while (!doneA) begin
      check(busyA, "busy while counting");
      @(negedge clk);
      lat++;
    end
    check(lat == (1 << NA), $sformatf("latency %0d", lat));
    check(int'(prodA) == expected, $sformatf("A %0d*%0d: got %0d exp %0d", x1, x2, prodA, expected));
    est = real'(x1) * real'(x2) / real'(1 << NA);
    check((real'(prodA) - est) < 0.06 * est + 8.0 && (est - real'(prodA)) < 0.06 * est + 8.0,
          $sformatf("A %0d*%0d: %0d far from %f", x1, x2, prodA, est));
    @(negedge clk);
    check(!doneA && int'(prodA) == expected, "done is one cycle, product held");
  endtask

  task automatic run_b(input int x1, input int x2);
    int expected, lat;
    real est;
    expected = 0;
    for (int t = 0; t < (1 << NB); t++) begin
      if ((x1 > rb1) && (x2 > rev_b(rb2))) expected++;
      rb1 = {rb1[NB-2:0], rb1[17] ^ rb1[10]};
      rb2 = {rb2[NB-2:0], rb2[17] ^ rb2[10]};
    end
    @(negedge clk);
    xb1 = NB'(x1); xb2 = NB'(x2); startB = 1'b1;
    @(negedge clk);
    startB = 1'b0;
    lat = 0;
    while (!doneB) begin
      @(negedge clk);
      lat++;
    end
    check(lat == (1 << NB), $sformatf("B latency %0d", lat));
    check(int'(prodB) == expected, $sformatf("B %0d*%0d: got %0d exp %0d", x1, x2, prodB, expected));
    est = real'(x1) * real'(x2) / real'(1 << NB);
    check((real'(prodB) - est) < 0.05 * est + 16.0 && (est - real'(prodB)) < 0.05 * est + 16.0,
          $sformatf("B %0d*%0d: %0d far from %f", x1, x2, prodB, est));
  endtask

  initial begin
    xa1 = '0; xa2 = '0; xb1 = '0; xb2 = '0;
    ra1 = 10'h1; ra2 = 10'h1; rb1 = 18'h1; rb2 = 18'h1;
    for (int k = 0; k < 1000; k++) begin
      ra2 = {ra2[NA-2:0], ra2[9] ^ ra2[6]};
      rb2 = {rb2[NB-2:0], rb2[17] ^ rb2[10]};
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_a(0, 0);
    run_a(1023, 1023);
    run_a(512, 512);
    run_a(300, 700);
    for (int k = 0; k < 40; k++) begin
      int x;
      x = $urandom % 1024;
      if (k % 2 == 0) run_a(x, x);
      else run_a(x, $urandom % 1024);
    end
    // 65 mV and 30 mV in the 10.8 word, squared; then a full-scale product
    run_b(65 * 256, 65 * 256);
    run_b(30 * 256, 30 * 256);
    run_b(200000, 150000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
