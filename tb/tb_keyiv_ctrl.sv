// tb_keyiv_ctrl: test of the key/IV setup sequencer at the cipher's sizes.
// For several random keys and IVs it checks the initial filling
// (FCSR1 <- k127..k32, FCSR2 <- k127..k0, FCSR3 <- k127..k64,
// FCSR4 <- k127..k0), the seed bit of every one of the 192 initialization
// clocks against seed vectors assembled here bit by bit, that the
// initialization lasts exactly 192 clocks with no valid keystream, that
// keystream is then valid on every clock, and that a start during RUN
// restarts the setup.
module tb_keyiv_ctrl;
  import hfcsr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [127:0] key, iv;
  logic load, en, init, seed_a, seed_b, seed_c, seed_d, ks_valid;
  logic [95:0]  fill1;
  logic [127:0] fill2, fill4;
  logic [63:0]  fill3;
  phase_e phase;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  keyiv_ctrl dut (
    .clk(clk), .rst_n(rst_n), .start(start), .key(key), .iv(iv),
    .load(load), .en(en), .fill1(fill1), .fill2(fill2), .fill3(fill3), .fill4(fill4),
    .init(init), .seed_a(seed_a), .seed_b(seed_b), .seed_c(seed_c), .seed_d(seed_d),
    .ks_valid(ks_valid), .phase(phase)
  );

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
    bit ea[192], eb[192], ec[192];
    int init_len;
    key = '0; iv = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(!en && !ks_valid && phase == PH_IDLE, "idle after reset");
    for (int rep = 0; rep < 4; rep++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      iv  = {$urandom, $urandom, $urandom, $urandom};
      for (int t = 0; t < 192; t++) begin
        ea[t] = (t < 32) ? key[t] : (t < 160) ? iv[t - 32] : 1'b0;
        eb[t] = (t < 128) ? iv[t] : 1'b0;
        ec[t] = (t < 64) ? key[t] : iv[t - 64];
      end
      start = 1'b1;
      #1;
      check(load, "load on start");
      for (int i = 0; i < 96; i++)  check(fill1[i] == key[i + 32], "fill1");
      for (int i = 0; i < 64; i++)  check(fill3[i] == key[i + 64], "fill3");
      check(fill2 == key && fill4 == key, "fill2/fill4");
      @(negedge clk) start = 1'b0;
      init_len = 0;
      while (init && init_len < 300) begin
        check(!ks_valid && en, "no keystream during init");
        check(seed_a == ea[init_len], $sformatf("seed_a t=%0d", init_len));
        check(seed_b == eb[init_len], $sformatf("seed_b t=%0d", init_len));
        check(seed_c == ec[init_len], $sformatf("seed_c t=%0d", init_len));
        check(seed_d == eb[init_len], $sformatf("seed_d t=%0d", init_len));
        init_len++;
        @(negedge clk);
      end
      check(init_len == 192, $sformatf("init lasts %0d clocks", init_len));
      for (int t = 0; t < 20 + rep; t++) begin
        check(ks_valid && en && !init && phase == PH_RUN, "keystream valid in run");
        check(!seed_a && !seed_b && !seed_c && !seed_d, "no seed in run");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
