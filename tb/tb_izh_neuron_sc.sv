// tb_izh_neuron_sc: end-to-end testbench of the stochastic Izhikevich neuron.
//
// Runs the neuron in three firing regimes (fast spiking, tonic spiking, mixed
// mode, with the usual a, b, c, d, I of the Izhikevich model) and checks, step
// by step:
//   * every step takes exactly 2^SC_N + 2 clocks;
//   * a step that starts at v >= 30 mV raises spike and gives v = c, u = u + d;
//   * any other step gives u' = u + dt a (b v - u) within 4 LSBs and
//     v' = v + dt (0.04 v^2 + 5 v + 140 - u + I) within the stochastic
//     squarer's error (25 % of 0.04 v^2 plus 10 counts of the squarer, which
//     covers the correlation error of the squarer at short word lengths);
// and, over each run, that the number of spikes is close to that of a
// floating-point model of the same equations with an exact square. It also
// uses load to set the start state, holds en low to check that the neuron
// then stays still, and counts every mechanism (steps, spikes, loads, pauses);
// a mechanism that never happened is a failure.
module tb_izh_neuron_sc;
  localparam int  SC_N  = 17;            // word length n = 17 halves the run time
  localparam int  STEPS = 800;           // 50 ms per regime at dt = 1/16 ms
  localparam int  SW = 26, CW = 18;
  localparam real LSB = 1.0 / 65536.0;
  localparam real DT = 1.0 / 16.0;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, load = 1'b0;
  logic signed [SW-1:0] v_init, u_init, i_in, c, d, v, u;
  logic signed [CW-1:0] a, b;
  logic spike, step_done;
  int checks = 0, failures = 0;
  int clk_count = 0, last_count = 0;
  int n_steps = 0, n_spikes = 0, n_loads = 0, n_pauses = 0;

  izh_neuron_sc #(.SC_N(SC_N)) dut (.clk, .rst_n, .en, .load, .v_init, .u_init, .i_in,
                                    .a, .b, .c, .d, .v, .u, .spike, .step_done);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    clk_count <= clk_count + 1;
    if (en && (clk_count - last_count > 2 * ((1 << SC_N) + 2))) begin
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
    #(64'd10 * (3 * (STEPS + 20) * ((64'd1 << SC_N) + 2) + 10000));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One regime: load the start state, run STEPS steps, compare with the model.
  task automatic run_regime(input string name, input real ar, input real br, input real cr,
                            input real dr, input real ir, input real v0);
    real mv, mu;
    int model_spikes, dut_spikes, first_dut, first_model;
    a = CW'(fx(ar)); b = CW'(fx(br)); c = SW'(fx(cr)); d = SW'(fx(dr)); i_in = SW'(fx(ir));
    v_init = SW'(fx(v0)); u_init = SW'(fx(br * v0));
    @(negedge clk);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    n_loads++;
    check(v == v_init && u == u_init, {name, ": load"});
    // en low: nothing may change
    repeat (50) @(negedge clk);
    check(v == v_init && u == u_init && !step_done, {name, ": hold while en low"});
    n_pauses++;

    mv = v0; mu = br * v0;
    model_spikes = 0; dut_spikes = 0; first_dut = -1; first_model = -1;
    en = 1'b1;
    last_count = clk_count;
    for (int s = 0; s < STEPS; s++) begin
      real vp, up, ve, ue, tol;
      int cyc;
      vp = real'(v) * LSB;  up = real'(u) * LSB;
      @(posedge step_done);
      @(negedge clk);
      cyc = clk_count - last_count;
      last_count = clk_count;
      n_steps++;
      check(cyc == (1 << SC_N) + 2, $sformatf("%s: step %0d took %0d clocks", name, s, cyc));
      if (vp >= 30.0) begin
        dut_spikes++;
        n_spikes++;
        if (first_dut < 0) first_dut = s;
        check(spike && v == c && real'(u) * LSB - (up + dr) < 2 * LSB && (up + dr) - real'(u) * LSB < 2 * LSB,
              $sformatf("%s: reset at step %0d", name, s));
      end else begin
        ve = vp + DT * (0.04 * vp * vp + 5.0 * vp + 140.0 - up + ir);
        ue = up + DT * ar * (br * vp - up);
        tol = DT * (0.25 * 0.04 * vp * vp + 10.0 * 0.04 * real'(1 << (20 - SC_N))) + 4 * LSB;
        check(!spike, $sformatf("%s: spurious spike at step %0d", name, s));
        check(real'(v) * LSB - ve <= tol && ve - real'(v) * LSB <= tol,
              $sformatf("%s: step %0d v'=%f exp %f (v=%f)", name, s, real'(v) * LSB, ve, vp));
        check(real'(u) * LSB - ue <= 4 * LSB && ue - real'(u) * LSB <= 4 * LSB,
              $sformatf("%s: step %0d u'=%f exp %f", name, s, real'(u) * LSB, ue));
      end
      // floating-point model with an exact square
      if (mv >= 30.0) begin
        model_spikes++;
        if (first_model < 0) first_model = s;
        mv = cr; mu = mu + dr;
      end else begin
        real nv;
        nv = mv + DT * (0.04 * mv * mv + 5.0 * mv + 140.0 - mu + ir);
        mu = mu + DT * ar * (br * mv - mu);
        mv = nv;
      end
    end
    en = 1'b0;
    @(negedge clk);
    $display("%s: %0d spikes (model %0d), first at step %0d (model %0d)",
             name, dut_spikes, model_spikes, first_dut, first_model);
    check(dut_spikes >= 1, {name, ": no spike"});
    check(dut_spikes - model_spikes <= 1 + model_spikes / 4 && model_spikes - dut_spikes <= 1 + model_spikes / 4,
          $sformatf("%s: spike count %0d vs model %0d", name, dut_spikes, model_spikes));
    check(first_dut - first_model <= 3 + first_model / 5 && first_model - first_dut <= 3 + first_model / 5,
          $sformatf("%s: first spike step %0d vs model %0d", name, first_dut, first_model));
  endtask

  initial begin
    v_init = '0; u_init = '0; i_in = '0; a = '0; b = '0; c = '0; d = '0;
    repeat (3) @(negedge clk);
    check(v == SW'(fx(-65.0)) && u == SW'(fx(-13.0)), "reset state");
    rst_n = 1'b1;
    run_regime("fast spiking",  0.10, 0.2, -65.0, 2.0, 10.0, -70.0);
    run_regime("tonic spiking", 0.02, 0.2, -65.0, 6.0, 14.0, -70.0);
    run_regime("mixed mode",    0.02, 0.2, -55.0, 4.0, 10.0, -70.0);
    $display("mechanisms: steps=%0d spikes=%0d loads=%0d pauses=%0d", n_steps, n_spikes, n_loads, n_pauses);
    check(n_steps > 0 && n_spikes > 0 && n_loads > 0 && n_pauses > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
