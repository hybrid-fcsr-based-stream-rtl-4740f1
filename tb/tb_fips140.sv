// tb_fips140: randomness workload at the generator's full size. For 100
// random key/IV pairs it sets up the generator, takes 20,000 keystream bits
// and applies the four FIPS PUB 140-1 statistical tests:
//   monobit   9654 < ones < 10346
//   poker     1.03 < X < 57.4, X = 16/5000 * sum f(i)^2 - 5000 over the
//             5000 4-bit nibbles
//   runs      for ones and for zeros, runs of length 1..5 and 6+ within
//             2267-2733, 1079-1421, 502-748, 223-402, 90-223, 90-223
//   long run  no run of 34 or more
// Every test must pass for every sample (a 100 % pass rate). It also
// checks that a bit arrives on every clock once the keystream is valid, and
// measures over all 2,000,000 bits how often z agrees with x1, x2, x3, x4,
// y and the DSG carry: each must be 1/2 within 0.01, the published
// correlation immunity of the output.
module tb_fips140;
  localparam int NKEYS = 100;
  localparam int NB    = 20000;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [127:0] key, iv;
  logic ks, ks_valid, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hfcsr_keystream_gen dut (
    .clk(clk), .rst_n(rst_n), .start(start), .key(key), .iv(iv),
    .ks(ks), .ks_valid(ks_valid), .busy(busy)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (NKEYS * (NB + 300) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit s[NB];
  localparam int RLO[6] = '{2267, 1079, 502, 223, 90, 90};
  localparam int RHI[6] = '{2733, 1421, 748, 402, 223, 223};

  initial begin
    int pass_mono = 0, pass_poker = 0, pass_runs = 0, pass_long = 0;
    longint agree[6] = '{default: 0};
    string  names[6] = '{"x1", "x2", "x3", "x4", "y", "w"};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < NKEYS; k++) begin
      int ones, f[16], runs[2][6], longest, len;
      real x;
      bit ok;
      key = {$urandom, $urandom, $urandom, $urandom};
      iv  = {$urandom, $urandom, $urandom, $urandom};
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      while (!ks_valid) @(negedge clk);
      ok = 1'b1;
      for (int t = 0; t < NB; t++) begin
        if (!ks_valid) ok = 1'b0;
        s[t] = ks;
        agree[0] += longint'(dut.x1 == ks);
        agree[1] += longint'(dut.x2 == ks);
        agree[2] += longint'(dut.x3 == ks);
        agree[3] += longint'(dut.x4 == ks);
        agree[4] += longint'(dut.y == ks);
        agree[5] += longint'(dut.w == ks);
        @(negedge clk);
      end
      check(ok, "one keystream bit per clock");
      // Monobit.
      ones = 0;
      foreach (s[t]) ones += int'(s[t]);
      // Poker.
      f = '{default: 0};
      for (int j = 0; j < NB / 4; j++) f[{s[4*j], s[4*j+1], s[4*j+2], s[4*j+3]}]++;
      x = 0.0;
      foreach (f[i]) x += real'(f[i]) * real'(f[i]);
      x = 16.0 / 5000.0 * x - 5000.0;
      // Runs and long run.
      runs = '{default: 0};
      longest = 0; len = 1;
      for (int t = 1; t <= NB; t++) begin
        if (t < NB && s[t] == s[t-1]) len++;
        else begin
          runs[s[t-1]][(len > 6 ? 6 : len) - 1]++;
          if (len > longest) longest = len;
          len = 1;
        end
      end
      ok = 1'b1;
      for (int b = 0; b < 2; b++)
        for (int l = 0; l < 6; l++)
          if (runs[b][l] < RLO[l] || runs[b][l] > RHI[l]) ok = 1'b0;
      check(ones > 9654 && ones < 10346, $sformatf("monobit key %0d: %0d ones", k, ones));
      check(x > 1.03 && x < 57.4, $sformatf("poker key %0d: X = %f", k, x));
      check(ok, $sformatf("runs key %0d", k));
      check(longest < 34, $sformatf("long run key %0d: %0d", k, longest));
      pass_mono  += int'(ones > 9654 && ones < 10346);
      pass_poker += int'(x > 1.03 && x < 57.4);
      pass_runs  += int'(ok);
      pass_long  += int'(longest < 34);
    end
    for (int i = 0; i < 6; i++) begin
      real fr;
      fr = real'(agree[i]) / real'(NKEYS * NB);
      $display("P[%s = z] = %f", names[i], fr);
      check(fr > 0.49 && fr < 0.51, $sformatf("P[%s = z] = 1/2", names[i]));
    end
    $display("FIPS 140-1 pass rates over %0d samples: monobit %0d%%, poker %0d%%, runs %0d%%, long run %0d%%",
             NKEYS, pass_mono * 100 / NKEYS, pass_poker * 100 / NKEYS,
             pass_runs * 100 / NKEYS, pass_long * 100 / NKEYS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
