// lp_geffe: lp-Geffe generator, three Galois FCSRs combined by f.
//
// FCSR1, FCSR2 and FCSR3 run in lock step; their output bits x1, x2, x3 go
// through f(x1,x2,x3) = x1x2 + x2x3 + x3 to give y, one bit per enabled
// clock. With l-sequence FCSRs of periods T1, T2, T3 the period of y is
// lcm(T1, T2, T3). Each FCSR has its own initial filling (load_val*) and its
// own injected bit (inj*) for key initialization; load and en are shared.
// y and x1..x3 are combinational from the current register contents.
module lp_geffe #(
  parameter int unsigned    N1 = 96,
  parameter logic [N1-1:0]  D1 = hfcsr_pkg::D1,
  parameter int unsigned    N2 = 128,
  parameter logic [N2-1:0]  D2 = hfcsr_pkg::D2,
  parameter int unsigned    N3 = 64,
  parameter logic [N3-1:0]  D3 = hfcsr_pkg::D3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [N1-1:0] load_val1,
  input  logic [N2-1:0] load_val2,
  input  logic [N3-1:0] load_val3,
  input  logic          en,
  input  logic          inj1,
  input  logic          inj2,
  input  logic          inj3,
  output logic          x1,
  output logic          x2,
  output logic          x3,
  output logic          y
);

  fcsr_galois #(.N(N1), .D(D1)) u_fcsr1 (
    .clk(clk), .rst_n(rst_n), .load(load), .load_val(load_val1),
    .en(en), .inj(inj1), .out(x1), .state()
  );

  fcsr_galois #(.N(N2), .D(D2)) u_fcsr2 (
    .clk(clk), .rst_n(rst_n), .load(load), .load_val(load_val2),
    .en(en), .inj(inj2), .out(x2), .state()
  );

  fcsr_galois #(.N(N3), .D(D3)) u_fcsr3 (
    .clk(clk), .rst_n(rst_n), .load(load), .load_val(load_val3),
    .en(en), .inj(inj3), .out(x3), .state()
  );

  geffe_f u_f (.x1(x1), .x2(x2), .x3(x3), .y(y));

endmodule
