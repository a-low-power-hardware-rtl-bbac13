// tb_izh_word_length: the neuron at stochastic word lengths n = 15 .. 20
// (10 integer bits, 5 .. 10 fractional bits), fast-spiking regime
// (a = 0.1, b = 0.2, c = -65 mV, d = 2, I = 10, start v = -70 mV), 90 steps
// of 1/16 ms each.
//
// Each word length gets its own neuron and its own clock, so that the short
// words finish early. For every n it checks that a step takes exactly
// 2^n + 2 clocks and that reset steps give v = c, u = u + d, and prints the
// time of the first spike and the spike count next to those of a
// floating-point model with an exact square. For n >= 17 the first spike must
// fall within 10 steps of the model's. Shorter words are only reported: their
// squarer error, largely from correlation between the two LFSR streams, is
// large enough to change the response qualitatively (the error shrinks as
// n grows).
module tb_izh_word_length;
  localparam int  STEPS = 90;
  localparam int  SW = 26, CW = 18;
  localparam real LSB = 1.0 / 65536.0;
  localparam real DT = 1.0 / 16.0;
  localparam real AR = 0.1, BR = 0.2, CR = -65.0, DR = 2.0, IR = 10.0, V0 = -70.0;
  localparam int  NMIN = 15, NMAX = 20;

  int checks = 0, failures = 0;
  bit finished [NMIN:NMAX];
  int first_spike [NMIN:NMAX];
  int n_spikes [NMIN:NMAX];
  int model_first = -1, model_count = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic longint fx(input real x);
    return longint'(x * 65536.0);
  endfunction

  // Floating-point reference, exact square.
  initial begin
    real mv, mu;
    mv = V0; mu = BR * V0;
    for (int s = 0; s < STEPS; s++) begin
      if (mv >= 30.0) begin
        model_count++;
        if (model_first < 0) model_first = s;
        mv = CR; mu = mu + DR;
      end else begin
        real nv;
        nv = mv + DT * (0.04 * mv * mv + 5.0 * mv + 140.0 - mu + IR);
        mu = mu + DT * AR * (BR * mv - mu);
        mv = nv;
      end
    end
  end

  for (genvar n = NMIN; n <= NMAX; n++) begin : g_n
    logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, load = 1'b0;
    logic signed [SW-1:0] v, u;
    logic spike, step_done;
    int clk_count = 0, last_count = 0;

    izh_neuron_sc #(.SC_N(n)) dut (
      .clk, .rst_n, .en, .load,
      .v_init(SW'(fx(V0))), .u_init(SW'(fx(BR * V0))), .i_in(SW'(fx(IR))),
      .a(CW'(fx(AR))), .b(CW'(fx(BR))), .c(SW'(fx(CR))), .d(SW'(fx(DR))),
      .v, .u, .spike, .step_done);

    initial begin
      while (!finished[n]) begin
        #5 clk = ~clk;
      end
    end
    always @(posedge clk) begin
      clk_count <= clk_count + 1;
      if (en && (clk_count - last_count > 2 * ((1 << n) + 2))) begin
        failures++;
        $display("FAIL n=%0d: no step_done", n);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end

    initial begin
      first_spike[n] = -1;
      n_spikes[n] = 0;
      repeat (3) @(negedge clk);
      rst_n = 1'b1;
      @(negedge clk);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      en = 1'b1;
      last_count = clk_count;
      for (int s = 0; s < STEPS; s++) begin
        real vp, up;
        vp = real'(v) * LSB;  up = real'(u) * LSB;
        @(posedge step_done);
        @(negedge clk);
        check(clk_count - last_count == (1 << n) + 2, $sformatf("n=%0d step %0d clocks", n, s));
        last_count = clk_count;
        if (vp >= 30.0) begin
          n_spikes[n]++;
          if (first_spike[n] < 0) first_spike[n] = s;
          check(spike && v == SW'(fx(CR)) && real'(u) * LSB - (up + DR) < 2 * LSB && (up + DR) - real'(u) * LSB < 2 * LSB,
                $sformatf("n=%0d reset at step %0d", n, s));
        end
      end
      en = 1'b0;
      finished[n] = 1'b1;
    end
  end

  initial begin
    #(64'd10 * (64'd3 * STEPS * ((64'd1 << NMAX) + 2) + 10000));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (finished[15] && finished[16] && finished[17] && finished[18] && finished[19] && finished[20]);
    $display("exact model: first spike at step %0d, %0d spikes", model_first, model_count);
    for (int n = NMIN; n <= NMAX; n++) begin
      $display("n=%0d: first spike at step %0d, %0d spikes", n, first_spike[n], n_spikes[n]);
      if (n >= 17)
        check(first_spike[n] >= 0 && first_spike[n] - model_first <= 10 && model_first - first_spike[n] <= 10,
              $sformatf("n=%0d first spike %0d vs model %0d", n, first_spike[n], model_first));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
