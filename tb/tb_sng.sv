// tb_sng: self-checking testbench of sng.
//
// Exhaustive for N = 8: every pair (x, r) must give bit_out = 1 exactly when
// x > r. Then, for a few values of x, it feeds r from an 8-bit LFSR over one
// full period and checks that the stream holds exactly x - 1 ones (x >= 1),
// i.e. the stream density is x / 2^N up to one count.
module tb_sng;
  localparam int N = 8;
  logic [N-1:0] x, r;
  logic         b;
  int checks = 0, failures = 0;

  sng #(.N(N)) dut (.x, .r, .bit_out(b));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        x = N'(i); r = N'(j);
        #1;
        checks++;
        if (b !== (i > j)) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d r=%0d b=%0d", i, j, b);
        end
      end
    foreach (x_list[k]) begin
      int ones;
      logic [7:0] s;
      s = 8'h1;
      ones = 0;
      x = x_list[k];
      for (int t = 0; t < 255; t++) begin
        r = s;
        #1;
        ones += b;
        s = {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
      end
      checks++;
      if (ones != ((x_list[k] == 0) ? 0 : x_list[k] - 1)) begin
        failures++;
        $display("FAIL density x=%0d ones=%0d", x_list[k], ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x_list [6] = '{0, 1, 64, 100, 128, 255};
endmodule
