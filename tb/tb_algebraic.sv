// tb_algebraic: checks the first keystream bits of the datapath against the
// published algebraic expressions, with the key filling applied and key
// initialization skipped (as in the algebraic analysis). The lp-Geffe
// generator, FCSR4 and the DSG are assembled here at full size, as in the
// top, and for random keys:
//   x1 = k32, k33, k34^k32          x3 = k64, k65, k66^k64
//   x2 = x4 = k0, k1, k2^k0
//   z(0) = (k32k0 ^ k0k64 ^ k64) ^ k0
//   z(1) = (k33k1 ^ k1k65 ^ k65) ^ k1 ^ k0
//   z(2) = y(2) ^ (k2^k0) ^ (k1 ^ (y(1) ^ k1) k0)
// where y(t) = x1x2 ^ x2x3 ^ x3 at clock t. z(1) and z(2) depend on the DSG
// carry w(0) = x4(0) and w(1) = x4(1) ^ (y(1) ^ x4(1)) w(0).
module tb_algebraic;
  import hfcsr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [127:0] k;
  logic x1, x2, x3, x4, y, z, w;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lp_geffe u_geffe (
    .clk(clk), .rst_n(rst_n), .load(load),
    .load_val1(k[127:32]), .load_val2(k), .load_val3(k[127:64]),
    .en(en), .inj1(1'b0), .inj2(1'b0), .inj3(1'b0),
    .x1(x1), .x2(x2), .x3(x3), .y(y)
  );
  fcsr_galois #(.N(N4), .D(D4)) u_fcsr4 (
    .clk(clk), .rst_n(rst_n), .load(load), .load_val(k),
    .en(en), .inj(1'b0), .out(x4), .state()
  );
  dsg u_dsg (.clk(clk), .rst_n(rst_n), .clr(load), .en(en), .y(y), .x4(x4), .z(z), .w(w));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit y1, y2, a2, b2, c2;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < 64; r++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      load = 1'b1; en = 1'b1;
      @(negedge clk) load = 1'b0;
      // t = 0
      check(x1 == k[32] && x2 == k[0] && x3 == k[64] && x4 == k[0], "x(t=0)");
      check(z == ((k[32] & k[0]) ^ (k[0] & k[64]) ^ k[64] ^ k[0]), "z(t=0)");
      @(negedge clk);
      // t = 1
      y1 = (k[33] & k[1]) ^ (k[1] & k[65]) ^ k[65];
      check(x1 == k[33] && x2 == k[1] && x3 == k[65] && x4 == k[1], "x(t=1)");
      check(z == (y1 ^ k[1] ^ k[0]), "z(t=1)");
      @(negedge clk);
      // t = 2
      a2 = k[34] ^ k[32]; b2 = k[2] ^ k[0]; c2 = k[66] ^ k[64];
      y2 = (a2 & b2) ^ (b2 & c2) ^ c2;
      check(x1 == a2 && x2 == b2 && x3 == c2 && x4 == b2, "x(t=2)");
      check(z == (y2 ^ b2 ^ (k[1] ^ ((y1 ^ k[1]) & k[0]))), "z(t=2)");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
