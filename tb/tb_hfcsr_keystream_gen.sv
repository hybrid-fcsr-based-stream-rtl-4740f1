// tb_hfcsr_keystream_gen: end-to-end test of the hybrid FCSR keystream
// generator at its default (full) sizes.
//
// An independent reference model runs alongside the design: each FCSR is
// kept as a 2-adic integer p stepped by p' = (p - b)/2 + b*d (b = p mod 2,
// q = 1 - 2d), with the injected bit entering the top cell; y, the DSG carry
// and z come from the published truth tables. For several random keys and
// IVs the test checks every keystream bit, that initialization lasts 192
// clocks with ks_valid low and busy high, that the first valid bit appears
// 193 clocks after the start edge and that a bit then comes every clock. It
// also restarts the generator in the middle of a keystream (re-keying), reruns
// a key/IV pair to see the same keystream again, and changes one IV bit to
// see a different one. Each mechanism is counted and must occur.
module tb_hfcsr_keystream_gen;
  import hfcsr_pkg::*;
  localparam int W = 136;
  localparam int NBITS = 3000;
  localparam bit [7:0] F_TRUTH = 8'b1110_0010;  // y for {x1,x2,x3}
  localparam bit [7:0] W_NEXT  = 8'b1110_0100;  // w(j) for {y,x4,w(j-1)}

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [127:0] key, iv;
  logic ks, ks_valid, busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hfcsr_keystream_gen dut (
    .clk(clk), .rst_n(rst_n), .start(start), .key(key), .iv(iv),
    .ks(ks), .ks_valid(ks_valid), .busy(busy)
  );

  // ---- reference model ----
  logic [W-1:0] p [4];
  bit           mw;
  int           NN [4];
  logic [W-1:0] DD [4];

  function automatic logic [W-1:0] fstep(input logic [W-1:0] pv, input logic [W-1:0] d,
                                          input int n, input bit e);
    logic [W-1:0] nxt;
    bit b;
    b   = pv[0];
    nxt = (pv >> 1) + (b ? d : '0);
    if (e) nxt = b ? nxt - (W'(1) << (n - 1)) : nxt + (W'(1) << (n - 1));
    return nxt;
  endfunction

  function automatic bit model_y();
    return F_TRUTH[{p[0][0], p[1][0], p[2][0]}];
  endfunction

  function automatic bit model_z();
    return model_y() ^ p[3][0] ^ mw;
  endfunction

  task automatic model_load(input logic [127:0] k);
    p[0] = W'(k[127:32]);
    p[1] = W'(k);
    p[2] = W'(k[127:64]);
    p[3] = W'(k);
    mw   = 1'b0;
  endtask

  // One clock of the model; seed bits are injected XOR z when init = 1.
  task automatic model_clock(input bit init, input bit [3:0] seed);
    bit y, z, x4;
    y  = model_y();
    x4 = p[3][0];
    z  = y ^ x4 ^ mw;
    for (int i = 0; i < 4; i++) p[i] = fstep(p[i], DD[i], NN[i], init & (seed[i] ^ z));
    mw = W_NEXT[{y, x4, mw}];
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- mechanism counters ----
  int n_fill = 0, n_init_done = 0, n_fb_flip = 0, n_rekey = 0, n_carry_set = 0;
  int n_repeat_same = 0, n_iv_differs = 0;

  // Run one key setup and L keystream bits; returns the bits.
  // If abort_at >= 0, a new start is raised after abort_at keystream bits.
  task automatic run(input logic [127:0] k, input logic [127:0] v, input int L,
                     output bit bits[NBITS]);
    bit sa[192], sb[192], sc[192];
    int t, lat;
    for (int i = 0; i < 192; i++) begin
      sa[i] = (i < 32) ? k[i] : (i < 160) ? v[i - 32] : 1'b0;
      sb[i] = (i < 128) ? v[i] : 1'b0;
      sc[i] = (i < 64) ? k[i] : v[i - 64];
    end
    key = k; iv = v;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    model_load(k);
    n_fill++;
    lat = 1;
    t = 0;
    while (!ks_valid && lat < 400) begin
      check(busy, "busy during initialization");
      check(ks == model_z(), $sformatf("z during init t=%0d", t));
      if (model_z() && t < 192) n_fb_flip++;
      model_clock(1'b1, {sb[t], sc[t], sb[t], sa[t]});
      t++; lat++;
      @(negedge clk);
    end
    check(t == INIT_CLOCKS, $sformatf("initialization took %0d clocks", t));
    check(lat == INIT_CLOCKS + 1, $sformatf("first keystream bit %0d clocks after start", lat));
    n_init_done++;
    for (int j = 0; j < L; j++) begin
      check(ks_valid && !busy, "keystream valid every clock");
      check(ks == model_z(), $sformatf("keystream bit %0d", j));
      bits[j] = ks;
      if (mw) n_carry_set++;
      model_clock(1'b0, 4'b0);
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit s0[NBITS], s1[NBITS], s2[NBITS];
    logic [127:0] k0, v0;
    int diff;
    NN = '{N1, N2, N3, N4};
    DD = '{W'(D1), W'(D2), W'(D3), W'(D4)};
    key = '0; iv = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!ks_valid && !busy, "idle after reset");

    // Random keys; the second one starts in the middle of the first's keystream.
    for (int r = 0; r < 4; r++) begin
      k0 = {$urandom, $urandom, $urandom, $urandom};
      v0 = {$urandom, $urandom, $urandom, $urandom};
      if (r > 0 && r < 3) n_rekey++;   // start raised while in RUN
      run(k0, v0, (r == 3) ? NBITS : 500, s0);
    end
    // Same key and IV again: same keystream.
    run(k0, v0, NBITS, s1);
    diff = 0;
    for (int j = 0; j < NBITS; j++) diff += int'(s0[j] != s1[j]);
    check(diff == 0, "same key/IV gives the same keystream");
    if (diff == 0) n_repeat_same++;
    // One IV bit changed: a different keystream, about half the bits differ.
    v0[77] = ~v0[77];
    run(k0, v0, NBITS, s2);
    diff = 0;
    for (int j = 0; j < NBITS; j++) diff += int'(s0[j] != s2[j]);
    check(diff > NBITS / 3 && diff < 2 * NBITS / 3,
          $sformatf("one IV bit changes %0d of %0d keystream bits", diff, NBITS));
    if (diff > 0) n_iv_differs++;

    $display("mechanisms: fill=%0d init_done=%0d feedback_ones=%0d rekey_in_run=%0d carry_set=%0d same=%0d iv_differs=%0d",
             n_fill, n_init_done, n_fb_flip, n_rekey, n_carry_set, n_repeat_same, n_iv_differs);
    check(n_fill > 0, "initial filling happened");
    check(n_init_done > 0, "key initialization completed");
    check(n_fb_flip > 0, "keystream bit fed back during initialization");
    check(n_rekey > 0, "restart during keystream output");
    check(n_carry_set > 0, "DSG carry set");
    check(n_repeat_same > 0, "keystream reproduced");
    check(n_iv_differs > 0, "IV changes keystream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
