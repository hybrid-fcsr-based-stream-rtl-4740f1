// hfcsr_keystream_gen: hybrid FCSR keystream generator (lp-Geffe + DSG).
//
// Datapath: FCSR1, FCSR2, FCSR3 (Galois FCSRs of 96, 128 and 64 cells) feed
// the Geffe-type function f, whose output y and the output x4 of FCSR4
// (128 cells) enter Dawson's summation generator; the DSG output z is the
// keystream, one bit per clock. The main registers hold 416 bits of state;
// twelve carry cells and the DSG carry add 13 more.
//
// Setup: a start pulse loads the key into the four main registers and clears
// all carries (initial filling). For the next 192 clocks each FCSR receives
// seed bit XOR z on its input (z is fed back, no keystream is given out);
// after that ks_valid is high and ks carries one keystream bit per clock.
// This follows the cipher's setup; where the injected bit enters each FCSR
// (XORed into the bit entering the leftmost cell) and the start/valid
// handshake are this design's choices.
//
// Interface: start (one-clock pulse), key[127:0] and iv[127:0] (stable from
// start to the end of initialization), ks, ks_valid, busy (high during the
// 192 initialization clocks). Latency: first valid bit 193 clocks after the
// start edge; throughput one bit per clock.
module hfcsr_keystream_gen #(
  parameter int unsigned    N1 = hfcsr_pkg::N1,
  parameter logic [N1-1:0]  D1 = hfcsr_pkg::D1,
  parameter int unsigned    N2 = hfcsr_pkg::N2,
  parameter logic [N2-1:0]  D2 = hfcsr_pkg::D2,
  parameter int unsigned    N3 = hfcsr_pkg::N3,
  parameter logic [N3-1:0]  D3 = hfcsr_pkg::D3,
  parameter int unsigned    N4 = hfcsr_pkg::N4,
  parameter logic [N4-1:0]  D4 = hfcsr_pkg::D4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [hfcsr_pkg::KEY_W-1:0] key,
  input  logic [hfcsr_pkg::IV_W-1:0]  iv,
  output logic              ks,
  output logic              ks_valid,
  output logic              busy
);

  logic          load, en, init;
  logic          seed_a, seed_b, seed_c, seed_d;
  logic [N1-1:0] fill1;
  logic [N2-1:0] fill2;
  logic [N3-1:0] fill3;
  logic [N4-1:0] fill4;
  logic          x1, x2, x3, x4, y, z, w;
  hfcsr_pkg::phase_e phase;

  keyiv_ctrl #(.N1(N1), .N2(N2), .N3(N3), .N4(N4)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .key(key), .iv(iv),
    .load(load), .en(en),
    .fill1(fill1), .fill2(fill2), .fill3(fill3), .fill4(fill4),
    .init(init),
    .seed_a(seed_a), .seed_b(seed_b), .seed_c(seed_c), .seed_d(seed_d),
    .ks_valid(ks_valid), .phase(phase)
  );

  lp_geffe #(.N1(N1), .D1(D1), .N2(N2), .D2(D2), .N3(N3), .D3(D3)) u_geffe (
    .clk(clk), .rst_n(rst_n), .load(load),
    .load_val1(fill1), .load_val2(fill2), .load_val3(fill3),
    .en(en),
    .inj1(init & (seed_a ^ z)),
    .inj2(init & (seed_b ^ z)),
    .inj3(init & (seed_c ^ z)),
    .x1(x1), .x2(x2), .x3(x3), .y(y)
  );

  fcsr_galois #(.N(N4), .D(D4)) u_fcsr4 (
    .clk(clk), .rst_n(rst_n), .load(load), .load_val(fill4),
    .en(en), .inj(init & (seed_d ^ z)), .out(x4), .state()
  );

  dsg u_dsg (
    .clk(clk), .rst_n(rst_n), .clr(load), .en(en),
    .y(y), .x4(x4), .z(z), .w(w)
  );

  assign ks   = z;
  assign busy = init;

  // No keystream bit is given out during key initialization.
  a_no_ks_in_init: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(ks_valid && busy));

endmodule
