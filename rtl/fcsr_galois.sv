// fcsr_galois: Galois-architecture feedback-with-carry shift register.
//
// The main register m[N-1:0] shifts right by one cell per enabled clock and
// its rightmost cell m[0] is the output bit. The output is fed back to every
// tap i marked by a one in D = (|q| + 1) / 2. The top tap (i = N-1, always
// present) simply writes the feedback bit into m[N-1]; every lower tap holds
// an fcsr_addc cell that adds m[i+1], the feedback bit and its carry and
// writes the sum bit into m[i]. With carries the register computes the
// 2-adic expansion of p/q for q = 1 - 2D, so with |q| prime and 2 primitive
// modulo |q| the output is an l-sequence of period |q| - 1.
//
// Interface: load copies load_val into m and clears all carries (the key
// filling); en advances one step; load wins over en. inj is XORed into the
// bit entering m[N-1]: it is how key-initialization bits enter the register
// (this injection point is this design's choice; the cipher only shows the
// injected bit entering the register). out = m[0] is valid in the cycle the
// state holds it, so a register loaded with a outputs a[0], a[1], ...
// Number of carry cells = (ones in D) - 1.
module fcsr_galois #(
  parameter int unsigned   N = 8,
  parameter logic [N-1:0]  D = 8'b1010_1110   // |q| = 347, the 8-cell example
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] load_val,
  input  logic         en,
  input  logic         inj,
  output logic         out,
  output logic [N-1:0] state
);

  logic [N-1:0] m, m_next;
  logic         fb;

  assign fb    = m[0];
  assign out   = m[0];
  assign state = m;

  // The most significant tap must exist: q_r = 1.
  if (!D[N-1]) begin : g_bad_d
    $error("fcsr_galois: D[N-1] must be 1");
  end

  assign m_next[N-1] = fb ^ inj;

  for (genvar i = 0; i < N-1; i++) begin : g_cell
    if (D[i]) begin : g_tap
      fcsr_addc u_addc (
        .clk  (clk),
        .rst_n(rst_n),
        .clr  (load),
        .en   (en),
        .a    (m[i+1]),
        .b    (fb),
        .s    (m_next[i]),
        .c    ()
      );
    end else begin : g_shift
      assign m_next[i] = m[i+1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     m <= '0;
    else if (load)  m <= load_val;
    else if (en)    m <= m_next;
  end

endmodule
