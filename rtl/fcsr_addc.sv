// fcsr_addc: adder-with-carry cell of a Galois FCSR.
//
// The cell adds the bit arriving from the preceding main-register cell (a),
// the feedback bit (b) and its own stored carry c. The sum bit
// s = a ^ b ^ c leaves combinationally towards the next main-register cell;
// the carry ab ^ ac ^ bc is written into the carry flip-flop on the next
// enabled clock edge, so a full addition with carry takes one clock, as in
// the cell the cipher describes.
//
// Interface: clk, asynchronous active-low rst_n; clr clears the carry
// synchronously (used when a new key is loaded) and wins over en; en
// advances the carry. Reset and clear values (carry = 0) are this design's
// choice.
module fcsr_addc (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  logic c_next;

  always_comb begin
    s      = a ^ b ^ c;
    c_next = (a & b) ^ (a & c) ^ (b & c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      c <= 1'b0;
    else if (clr)    c <= 1'b0;
    else if (en)     c <= c_next;
  end

endmodule
