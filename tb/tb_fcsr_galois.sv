// tb_fcsr_galois: test of the Galois FCSR.
// - The 8-cell example register (|q| = 347, d = 174) and the four registers of
//   the cipher (FCSR1..FCSR4 at 96, 128, 64, 128 cells) are compared with an
//   integer model, with and without injected bits and with stalls.
// - Small l-sequence registers (|q| = 19, 37, 107, 131) must show least
//   period |q| - 1 (18, 36, 106, 130) and the half-period complement
//   property.
// - The first output bits of FCSR1 and FCSR2 after the key filling must
//   follow the published equations, e.g. x1 = k32, k33, k34^k32,
//   k35^k33^k34k32 and x2 = k0, k1, k2^k0, k3^k1^k2k0.
module tb_fcsr_galois;
  import hfcsr_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NU = 9;
  logic       done [NU];
  int         uc   [NU];
  int         uf   [NU];
  int checks = 0, failures = 0;

  tb_fcsr_unit #(.N(8),  .D(8'd174))                     u0 (.clk(clk), .done(done[0]), .checks(uc[0]), .failures(uf[0]));
  tb_fcsr_unit #(.N(N1), .D(D1))                         u1 (.clk(clk), .done(done[1]), .checks(uc[1]), .failures(uf[1]));
  tb_fcsr_unit #(.N(N2), .D(D2))                         u2 (.clk(clk), .done(done[2]), .checks(uc[2]), .failures(uf[2]));
  tb_fcsr_unit #(.N(N3), .D(D3))                         u3 (.clk(clk), .done(done[3]), .checks(uc[3]), .failures(uf[3]));
  tb_fcsr_unit #(.N(N4), .D(D4))                         u4 (.clk(clk), .done(done[4]), .checks(uc[4]), .failures(uf[4]));
  tb_fcsr_unit #(.N(4),  .D(4'd10),  .PERIOD(18))        u5 (.clk(clk), .done(done[5]), .checks(uc[5]), .failures(uf[5]));
  tb_fcsr_unit #(.N(5),  .D(5'd19),  .PERIOD(36))        u6 (.clk(clk), .done(done[6]), .checks(uc[6]), .failures(uf[6]));
  tb_fcsr_unit #(.N(6),  .D(6'd54),  .PERIOD(106))       u7 (.clk(clk), .done(done[7]), .checks(uc[7]), .failures(uf[7]));
  tb_fcsr_unit #(.N(7),  .D(7'd66),  .PERIOD(130))       u8 (.clk(clk), .done(done[8]), .checks(uc[8]), .failures(uf[8]));

  // Published equations for the first outputs after the key filling.
  logic [127:0]  key;
  logic          rst_n = 1'b0, load = 1'b0;
  logic          o1, o2;
  logic [N1-1:0] s1;
  logic [N2-1:0] s2;
  fcsr_galois #(.N(N1), .D(D1)) e1 (.clk(clk), .rst_n(rst_n), .load(load), .load_val(key[127:32]),
                                    .en(1'b1), .inj(1'b0), .out(o1), .state(s1));
  fcsr_galois #(.N(N2), .D(D2)) e2 (.clk(clk), .rst_n(rst_n), .load(load), .load_val(key),
                                    .en(1'b1), .inj(1'b0), .out(o2), .state(s2));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit x1e[4], x2e[4];
    for (int k = 0; k < 6; k++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      if (k == 0) key = '1;
      x1e[0] = key[32];
      x1e[1] = key[33];
      x1e[2] = key[34] ^ key[32];
      x1e[3] = key[35] ^ key[33] ^ (key[34] & key[32]);
      x2e[0] = key[0];
      x2e[1] = key[1];
      x2e[2] = key[2] ^ key[0];
      x2e[3] = key[3] ^ key[1] ^ (key[2] & key[0]);
      @(negedge clk); rst_n = 1'b1; load = 1'b1;
      @(negedge clk); load = 1'b0;
      for (int t = 0; t < 4; t++) begin
        check(o1 == x1e[t], $sformatf("x1(t=%0d)", t));
        check(o2 == x2e[t], $sformatf("x2(t=%0d)", t));
        @(negedge clk);
      end
    end
    wait (done.and());
    for (int i = 0; i < NU; i++) begin
      checks += uc[i];
      failures += uf[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
