// Two-bit carry-lookahead adder: {cout, s} = a + b + cin.
//
// Generate and propagate terms g_k = a_k & b_k, p_k = a_k ^ b_k give both
// carries directly from cin, so the carry out does not ripple through the
// low bit:
//   c1   = g0 | p0 & cin
//   cout = g1 | p1 & g0 | p1 & p0 & cin
// The document uses this cell, chained through its carries, to add the sum
// and carry outputs of the array; the lookahead equations are the standard
// ones. Combinational, no clock.
module cla2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] s,
  output logic       cout
);

  logic [1:0] g, p;
  logic       c1;

  always_comb begin
    g    = a & b;
    p    = a ^ b;
    c1   = g[0] | (p[0] & cin);
    cout = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    s    = p ^ {c1, cin};
  end

endmodule
