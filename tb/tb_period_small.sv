// tb_period_small: the published small-size experiment on the complete
// generator (lp-Geffe generator + DSG). Five configurations of connection
// integers (q1, q2, q3, q4) run side by side, each through the full key
// setup, and the measured least periods must match the published ones:
//   (19, 53, 107, 131)  T_y = 24804  T_z = 124020
//   (19, 107, 131, 11)  T_y = 62010  T_z = 62010
//   (19, 83, 131, 11)   T_y = 47970  T_z = 47970
//   (19, 107, 173, 37)  T_y = 82044  T_z = 82044
//   (19, 11, 149, 53)   T_y = 6660   T_z = 86580
// i.e. T_y = lcm(T1, T2, T3) and T_z = lcm(T_y, T4).
// Register sizes and taps: |q| = 2d - 1, d = 10, 27, 54, 66, 6, 42, 87, 19, 75
// for |q| = 19, 53, 107, 131, 11, 83, 173, 37, 149.
module tb_period_small;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NU = 5;
  logic done [NU];
  int   uc   [NU];
  int   uf   [NU];
  int checks = 0, failures = 0;

  tb_period_unit #(.N1(4), .D1(4'd10), .N2(5), .D2(5'd27), .N3(6), .D3(6'd54), .N4(7), .D4(7'd66),
                   .TY(24804), .TZ(124020)) r1 (.clk(clk), .done(done[0]), .checks(uc[0]), .failures(uf[0]));
  tb_period_unit #(.N1(4), .D1(4'd10), .N2(6), .D2(6'd54), .N3(7), .D3(7'd66), .N4(3), .D4(3'd6),
                   .TY(62010), .TZ(62010))  r2 (.clk(clk), .done(done[1]), .checks(uc[1]), .failures(uf[1]));
  tb_period_unit #(.N1(4), .D1(4'd10), .N2(6), .D2(6'd42), .N3(7), .D3(7'd66), .N4(3), .D4(3'd6),
                   .TY(47970), .TZ(47970))  r3 (.clk(clk), .done(done[2]), .checks(uc[2]), .failures(uf[2]));
  tb_period_unit #(.N1(4), .D1(4'd10), .N2(6), .D2(6'd54), .N3(7), .D3(7'd87), .N4(5), .D4(5'd19),
                   .TY(82044), .TZ(82044))  r4 (.clk(clk), .done(done[3]), .checks(uc[3]), .failures(uf[3]));
  tb_period_unit #(.N1(4), .D1(4'd10), .N2(3), .D2(3'd6),  .N3(7), .D3(7'd75), .N4(5), .D4(5'd27),
                   .TY(6660),  .TZ(86580))  r5 (.clk(clk), .done(done[4]), .checks(uc[4]), .failures(uf[4]));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (done.and());
    for (int i = 0; i < NU; i++) begin
      checks += uc[i];
      failures += uf[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
