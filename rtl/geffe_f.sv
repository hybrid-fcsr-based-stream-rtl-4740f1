// geffe_f: nonlinear combining function of the lp-Geffe generator.
//
// y = f(x1, x2, x3) = x1x2 + x2x3 + x3 over GF(2), the function the cipher
// specifies. Written out, x2 selects between the other two inputs:
// y = x1 when x2 = 1 and y = x3 when x2 = 0, so y agrees with x1 and with
// x3 three times in four and with x2 half the time.
// Purely combinational, no clock.
module geffe_f (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  output logic y
);

  always_comb y = (x1 & x2) ^ (x2 & x3) ^ x3;

endmodule
