// tb_izh_mixed_mode: mixed mode response of the stochastic Izhikevich neuron at its default
// sizes (18-bit stochastic word, dt = 1/16 ms), run for 80 ms.
//
// Parameters (standard values of the Izhikevich model for this regime):
// a = 0.02, b = 0.2, c = -55.0 mV, d = 4.0, I = 10.0, start v = -70 mV, u = b v.
// The same equations are integrated in floating point with an exact square
// and the two responses are compared with the error measures used to judge
// approximate Izhikevich hardware:
//   MERRt = mean over spike intervals of |dt_sc - dt_exact| / dt_exact * 100
//   RSEE  = |sum v_exact^2 - sum v_sc^2| / sum v_exact^2 * 100
// Both are printed. Checks: every reset step gives v = c, u = u + d; every
// step takes 2^18 + 2 clocks; the neuron fires; the spike counts agree within
// 1; MERRt stays below 35.0 % and RSEE below 10.0 %.
module tb_izh_mixed_mode;
  localparam int  STEPS = 1280;
  localparam int  SW = 26, CW = 18;
  localparam real LSB = 1.0 / 65536.0;
  localparam real DT = 1.0 / 16.0;
  localparam real AR = 0.02, BR = 0.2, CR = -55.0, DR = 4.0, IR = 10.0, V0 = -70.0;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, load = 1'b0;
  logic signed [SW-1:0] v_init, u_init, i_in, c, d, v, u;
  logic signed [CW-1:0] a, b;
  logic spike, step_done;
  int checks = 0, failures = 0;
  int clk_count = 0, last_count = 0;

  izh_neuron_sc dut (.clk, .rst_n, .en, .load, .v_init, .u_init, .i_in,
                     .a, .b, .c, .d, .v, .u, .spike, .step_done);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    clk_count <= clk_count + 1;
    if (en && (clk_count - last_count > 2 * ((1 << 18) + 2))) begin
      failures++;
      $display("FAIL no step_done");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

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

  initial begin
    #(64'd10 * ((STEPS + 20) * ((64'd1 << 18) + 2) + 10000));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mv, mu, e_exact, e_sc, merr, rsee;
    int t_sc [$], t_ex [$];
    int npairs;
    a = CW'(fx(AR)); b = CW'(fx(BR)); c = SW'(fx(CR)); d = SW'(fx(DR)); i_in = SW'(fx(IR));
    v_init = SW'(fx(V0)); u_init = SW'(fx(BR * V0));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(v == v_init && u == u_init, "load");
    mv = V0; mu = BR * V0;
    e_exact = 0.0; e_sc = 0.0;
    en = 1'b1;
    last_count = clk_count;
    for (int s = 0; s < STEPS; s++) begin
      real vp, up;
      vp = real'(v) * LSB;  up = real'(u) * LSB;
      e_sc += vp * vp;
      e_exact += mv * mv;
      @(posedge step_done);
      @(negedge clk);
      check(clk_count - last_count == (1 << 18) + 2, $sformatf("step %0d clocks", s));
      last_count = clk_count;
      if (vp >= 30.0) begin
        t_sc.push_back(s);
        check(spike && v == c && real'(u) * LSB - (up + DR) < 2 * LSB && (up + DR) - real'(u) * LSB < 2 * LSB,
              $sformatf("reset at step %0d", s));
      end else begin
        check(!spike, $sformatf("spurious spike at step %0d", s));
      end
      if (mv >= 30.0) begin
        t_ex.push_back(s);
        mv = CR; mu = mu + DR;
      end else begin
        real nv;
        nv = mv + DT * (0.04 * mv * mv + 5.0 * mv + 140.0 - mu + IR);
        mu = mu + DT * AR * (BR * mv - mu);
        mv = nv;
      end
    end
    en = 1'b0;
    npairs = ((t_sc.size() < t_ex.size()) ? t_sc.size() : t_ex.size()) - 1;
    merr = 0.0;
    for (int k = 0; k < npairs; k++) begin
      real dp, dor;
      dp = real'(t_sc[k+1] - t_sc[k]);
      dor = real'(t_ex[k+1] - t_ex[k]);
      merr += ((dp > dor) ? dp - dor : dor - dp) / dor * 100.0;
    end
    if (npairs > 0) merr = merr / real'(npairs);
    rsee = (e_exact > e_sc ? e_exact - e_sc : e_sc - e_exact) / e_exact * 100.0;
    $display("mixed mode: %0d spikes (exact model %0d), first at %.2f ms (exact %.2f ms)",
             t_sc.size(), t_ex.size(), (t_sc.size() > 0) ? real'(t_sc[0]) * DT : -1.0,
             (t_ex.size() > 0) ? real'(t_ex[0]) * DT : -1.0);
    $display("mixed mode: MERRt = %.2f %%, RSEE = %.2f %% over %0d intervals", merr, rsee, npairs);
    check(t_sc.size() >= 2, "fires at least twice");
    check(t_sc.size() - t_ex.size() <= 1 && t_ex.size() - t_sc.size() <= 1, "spike count");
    check(merr < 35.0, "MERRt bound");
    check(rsee < 10.0, "RSEE bound");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
