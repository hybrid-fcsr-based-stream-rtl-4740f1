// dsg: Dawson's summation generator stage with its carry flip-flop.
//
// Each enabled clock combines the lp-Geffe output y and the FCSR4 output x4
// with the stored carry w (w(j-1)):
//   z    = y ^ x4 ^ w(j-1)                 (output, combinational)
//   w(j) = x4 ^ (y ^ x4) & w(j-1)          (next carry)
// The carry function is the one the cipher specifies and tabulates; note it
// is not the majority carry of a binary adder: with w(j-1) = 0 the next carry
// is x4 and with w(j-1) = 1 it is y. This choice gives the 1/2 carry-output
// correlation the cipher claims.
//
// Interface: clr clears w synchronously (w(-1) = 0 at key load) and wins over
// en; en advances w. Asynchronous active-low reset also clears w.
module dsg (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  input  logic y,
  input  logic x4,
  output logic z,
  output logic w
);

  logic w_next;

  always_comb begin
    z      = y ^ x4 ^ w;
    w_next = x4 ^ ((y ^ x4) & w);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    w <= 1'b0;
    else if (clr)  w <= 1'b0;
    else if (en)   w <= w_next;
  end

endmodule
