// tb_fcsr_unit: test harness for one fcsr_galois instance, used by
// tb_fcsr_galois. It runs two tests and reports its counts on its ports.
//
// Model test: random fillings and random injected bits over NSTEP steps,
// compared with an integer model of the register. The model keeps the
// 2-adic value p = m + 2c (main register plus carries) and steps it as
//   b = p mod 2,  p' = (p - b)/2 + b*d,  then +/- 2^(N-1) when the injected
//   bit flips the bit entering the top cell,
// which is the FCSR recurrence for connection integer q = 1 - 2d.
//
// Period test (PERIOD > 0): after a nonzero filling and a warm-up, the
// output must have least period PERIOD (= |q| - 1 for an l-sequence) and
// each half-period must be the bitwise complement of the other.
module tb_fcsr_unit #(
  parameter int unsigned  N      = 8,
  parameter logic [N-1:0] D      = 8'd174,
  parameter int unsigned  PERIOD = 0,
  parameter int unsigned  NSTEP  = 400
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned W = 136;

  logic         rst_n, load, en, inj, out;
  logic [N-1:0] load_val, state;

  fcsr_galois #(.N(N), .D(D)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .load_val(load_val),
    .en(en), .inj(inj), .out(out), .state(state)
  );

  function automatic logic [W-1:0] model_step(input logic [W-1:0] p, input bit e);
    logic [W-1:0] dd, nxt;
    bit b;
    dd  = W'(D);
    b   = p[0];
    nxt = (p >> 1) + (b ? dd : '0);
    if (e) nxt = b ? nxt - (W'(1) << (N-1)) : nxt + (W'(1) << (N-1));
    return nxt;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL (N=%0d): %s", N, what);
    end
  endtask

  function automatic logic [N-1:0] rand_fill();
    logic [N-1:0] v;
    for (int i = 0; i < int'(N); i++) v[i] = 1'($urandom);
    return v;
  endfunction

  bit seq[];

  initial begin
    logic [W-1:0] p;
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; load = 1'b0; en = 1'b0; inj = 1'b0; load_val = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Model test.
    for (int rep = 0; rep < 4; rep++) begin
      load_val = rand_fill();
      load = 1'b1; en = 1'b1;
      @(negedge clk);
      load = 1'b0;
      p = W'(load_val);
      check(state == load_val, "filling loaded");
      for (int t = 0; t < int'(NSTEP); t++) begin
        inj = (rep >= 2) ? 1'($urandom) : 1'b0;
        en  = (rep == 3) ? ($urandom % 3 != 0) : 1'b1;
        #1;
        check(out == p[0], $sformatf("output bit, step %0d", t));
        @(negedge clk);
        if (en) p = model_step(p, inj);
      end
    end
    inj = 1'b0; en = 1'b1;
    // Period test.
    if (PERIOD > 0) begin
      int T;
      bit same;
      load_val = '0; load_val[0] = 1'b1; load_val[N/2] = 1'b1;
      load = 1'b1;
      @(negedge clk) load = 1'b0;
      repeat (4 * N + 16) @(negedge clk);
      seq = new[2 * PERIOD + 2];
      foreach (seq[i]) begin
        seq[i] = out;
        @(negedge clk);
      end
      T = 0;
      for (int c = 1; c <= int'(PERIOD) && T == 0; c++) begin
        same = 1'b1;
        for (int i = 0; i < int'(PERIOD); i++) if (seq[i] != seq[i + c]) same = 1'b0;
        if (same) T = c;
      end
      check(T == int'(PERIOD), $sformatf("least period %0d, expected %0d", T, PERIOD));
      same = 1'b1;
      for (int i = 0; i < int'(PERIOD); i++) if (seq[i + PERIOD / 2] == seq[i]) same = 1'b0;
      check(same, "second half-period is the complement of the first");
    end
    done = 1'b1;
  end
endmodule
