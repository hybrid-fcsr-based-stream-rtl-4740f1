// tb_period_unit: one small-size configuration of the complete keystream
// generator, used by tb_period_small. After key setup and a warm-up it
// records 2*TZ output bits and checks that FCSR1..FCSR4 have least periods
// |q|-1, that the lp-Geffe output y has least period TY and that the
// keystream z has least period TZ (TZ repeats, and TZ/p does not for every
// prime p dividing TZ). Results are reported on its ports.
module tb_period_unit #(
  parameter int unsigned    N1 = 4,
  parameter logic [N1-1:0]  D1 = 4'd10,
  parameter int unsigned    N2 = 5,
  parameter logic [N2-1:0]  D2 = 5'd27,
  parameter int unsigned    N3 = 6,
  parameter logic [N3-1:0]  D3 = 6'd54,
  parameter int unsigned    N4 = 7,
  parameter logic [N4-1:0]  D4 = 7'd66,
  parameter int             TY = 24804,
  parameter int             TZ = 124020,
  parameter logic [127:0]   KEY = 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210,
  parameter logic [127:0]   IV  = 128'h0f1e_2d3c_4b5a_6978_8796_a5b4_c3d2_e1f0
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  logic rst_n, start, ks, ks_valid, busy;

  hfcsr_keystream_gen #(.N1(N1), .D1(D1), .N2(N2), .D2(D2),
                        .N3(N3), .D3(D3), .N4(N4), .D4(D4)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .key(KEY), .iv(IV),
    .ks(ks), .ks_valid(ks_valid), .busy(busy)
  );

  bit zs[], ys[], xs[4][];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL (TZ=%0d): %s", TZ, what);
    end
  endtask

  function automatic bit has_period(ref bit s[], input int c, input int span);
    for (int i = 0; i < span; i++) if (s[i] != s[i + c]) return 1'b0;
    return 1'b1;
  endfunction

  // True when c is the least period of s (c repeats, c/p does not).
  function automatic bit least_period_is(ref bit s[], input int c);
    int r;
    if (!has_period(s, c, c)) return 1'b0;
    r = c;
    for (int p = 2; p <= r; p++) begin
      if (r % p == 0) begin
        if (has_period(s, c / p, c)) return 1'b0;
        while (r % p == 0) r /= p;
      end
    end
    return 1'b1;
  endfunction

  initial begin
    int tq[4];
    tq = '{int'(2 * D1 - 2), int'(2 * D2 - 2), int'(2 * D3 - 2), int'(2 * D4 - 2)};
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; start = 1'b0;
    zs = new[2 * TZ]; ys = new[2 * TZ];
    foreach (xs[i]) xs[i] = new[2 * TZ];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1; start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!ks_valid) @(negedge clk);
    repeat (64) @(negedge clk);
    for (int t = 0; t < 2 * TZ; t++) begin
      zs[t] = ks;
      ys[t] = dut.y;
      xs[0][t] = dut.x1; xs[1][t] = dut.x2; xs[2][t] = dut.x3; xs[3][t] = dut.x4;
      @(negedge clk);
    end
    for (int i = 0; i < 4; i++)
      check(least_period_is(xs[i], tq[i]), $sformatf("FCSR%0d period %0d", i + 1, tq[i]));
    check(least_period_is(ys, TY), $sformatf("T_y = %0d", TY));
    check(least_period_is(zs, TZ), $sformatf("T_z = %0d", TZ));
    done = 1'b1;
  end
endmodule
