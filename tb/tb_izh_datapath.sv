// tb_izh_datapath: self-checking testbench of izh_datapath (default sizes).
//
// Random states, coefficients, currents and squarer counts, checked against
// the Izhikevich equations evaluated in floating point in this file:
//   v' = v + dt (0.16 * count + 5 v + 140 - u + I)
//   u' = u + dt a (b v - u)
// where 0.16 * count is 0.04 v^2 rebuilt from an 18-bit, 10-integer-bit
// squarer count (count ~ 2^18 v^2 / 2^20), dt = 1/16 ms. Results must agree
// within 3 LSBs of the 16-bit fraction. Steps starting at v >= 30 mV must give
// exactly v' = c and u' = u + d. The squarer operand v_mag must equal
// floor(|v| * 2^8). A case with u + d beyond the state range checks saturation.
module tb_izh_datapath;
  localparam int SW = 26, CW = 18, SF = 16;
  localparam real LSB = 1.0 / 65536.0;
  localparam real DT = 1.0 / 16.0;

  logic signed [SW-1:0] v, u, i_in, c, d, v_next, u_next;
  logic signed [CW-1:0] a, b;
  logic [18:0] sq_count;
  logic [17:0] v_mag;
  logic fired;
  int checks = 0, failures = 0;
  int n_fired = 0, n_int = 0;

  izh_datapath dut (.v, .u, .i_in, .a, .b, .c, .d, .sq_count, .v_mag, .v_next, .u_next, .fired);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom % (hi - lo + 1));
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5000; k++) begin
      real vr, ur, ir, ar, br, sq, ve, ue;
      longint vm;
      v = SW'(rnd(-100 * 65536, 45 * 65536));
      if (k % 10 == 0) v = SW'(30 * 65536 - (k % 3) + 1);  // around the threshold
      u = SW'(rnd(-30 * 65536, 30 * 65536));
      i_in = SW'(rnd(0, 20 * 65536));
      a = CW'(rnd(0, 13107));            // 0 .. 0.2
      b = CW'(rnd(-6554, 19661));        // -0.1 .. 0.3
      c = SW'(rnd(-70 * 65536, -50 * 65536));
      d = SW'(rnd(0, 10 * 65536));
      vr = real'(v) * LSB;  ur = real'(u) * LSB;  ir = real'(i_in) * LSB;
      ar = real'(a) * LSB;  br = real'(b) * LSB;
      sq_count = 19'(int'((vr * vr / 1048576.0) * 262144.0 * (0.95 + 0.1 * real'($urandom % 1000) / 1000.0)));
      #1;
      vm = ((v < 0) ? -longint'(v) : longint'(v)) / 256;
      check(longint'(v_mag) == vm, $sformatf("v_mag %0d exp %0d", v_mag, vm));
      if (vr >= 30.0) begin
        n_fired++;
        check(fired && v_next == c && u_next == u + d,
              $sformatf("reset at v=%f: fired=%0d v'=%0d u'=%0d", vr, fired, v_next, u_next));
      end else begin
        n_int++;
        sq = 0.16 * real'(sq_count);
        ve = vr + DT * (sq + 5.0 * vr + 140.0 - ur + ir);
        ue = ur + DT * ar * (br * vr - ur);
        check(!fired, "fired below threshold");
        check((real'(v_next) * LSB - ve) <= 3 * LSB && (ve - real'(v_next) * LSB) <= 3 * LSB,
              $sformatf("v' %f exp %f (v=%f u=%f I=%f cnt=%0d)", real'(v_next) * LSB, ve, vr, ur, ir, sq_count));
        check((real'(u_next) * LSB - ue) <= 3 * LSB && (ue - real'(u_next) * LSB) <= 3 * LSB,
              $sformatf("u' %f exp %f (a=%f b=%f v=%f u=%f)", real'(u_next) * LSB, ue, ar, br, vr, ur));
      end
    end
    // saturation of u + d at the top of the state range
    v = SW'(35 * 65536); u = SW'(510 * 65536); d = SW'(20 * 65536); c = SW'(-65 * 65536);
    #1;
    check(fired && u_next == SW'((1 << 25) - 1), $sformatf("saturation u'=%0d", u_next));
    check(n_fired > 100 && n_int > 1000, "both paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
