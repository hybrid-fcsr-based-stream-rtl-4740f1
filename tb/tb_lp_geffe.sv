// tb_lp_geffe: test of the lp-Geffe generator at small connection integers
// |q| = 19, 53, 107 (periods 18, 52, 106, the first configuration of the
// published small-size experiment). Checks every clock that y = f(x1,x2,x3)
// by the published truth table, and that after a warm-up x1, x2, x3 have
// least periods 18, 52, 106 and y has least period lcm = 24804 (no proper
// divisor 24804/p, p in {2, 3, 13, 53}, is a period).
module tb_lp_geffe;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic x1, x2, x3, y;
  int checks = 0, failures = 0;
  localparam bit [7:0] TRUTH = 8'b1110_0010;
  localparam int TY = 24804;

  always #5 clk = ~clk;

  lp_geffe #(.N1(4), .D1(4'd10), .N2(5), .D2(5'd27), .N3(6), .D3(6'd54)) dut (
    .clk(clk), .rst_n(rst_n), .load(load),
    .load_val1(4'b0101), .load_val2(5'b00110), .load_val3(6'b100001),
    .en(en), .inj1(1'b0), .inj2(1'b0), .inj3(1'b0),
    .x1(x1), .x2(x2), .x3(x3), .y(y)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit ys[2*TY];
  bit xs[3][2*TY];

  function automatic int least_period(ref bit s[2*TY], input int maxp);
    for (int c = 1; c <= maxp; c++) begin
      bit same = 1'b1;
      for (int i = 0; i < maxp && same; i++) if (s[i] != s[i + c]) same = 1'b0;
      if (same) return c;
    end
    return 0;
  endfunction

  function automatic bit periodic(ref bit s[2*TY], input int c);
    for (int i = 0; i < TY; i++) if (s[i] != s[i + c]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int bad_f;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1; load = 1'b1; en = 1'b1;
    @(negedge clk) load = 1'b0;
    repeat (40) @(negedge clk);
    bad_f = 0;
    for (int t = 0; t < 2 * TY; t++) begin
      ys[t] = y; xs[0][t] = x1; xs[1][t] = x2; xs[2][t] = x3;
      if (y != TRUTH[{x1, x2, x3}]) bad_f++;
      @(negedge clk);
    end
    check(bad_f == 0, $sformatf("y = f(x1,x2,x3) on every clock (%0d mismatches)", bad_f));
    check(least_period(xs[0], 18) == 18, "period of x1 = 18");
    check(least_period(xs[1], 52) == 52, "period of x2 = 52");
    check(least_period(xs[2], 106) == 106, "period of x3 = 106");
    check(periodic(ys, TY), "y repeats after 24804");
    check(!periodic(ys, TY / 2), "y not periodic in 24804/2");
    check(!periodic(ys, TY / 3), "y not periodic in 24804/3");
    check(!periodic(ys, TY / 13), "y not periodic in 24804/13");
    check(!periodic(ys, TY / 53), "y not periodic in 24804/53");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
