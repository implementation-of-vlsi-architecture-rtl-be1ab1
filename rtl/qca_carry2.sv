// qca_carry2 -- 2-bit carry slice of the majority-gate ripple adder.
//
// For bit positions i and i+1 the slice forms p_i = a_i | b_i and
// g_i = a_i & b_i (majority gates with a constant input) and produces
//   c_{i+1} = M(p_i, g_i, c_i)
//   c_{i+2} = M(M(a_{i+1}, b_{i+1}, g_i), M(a_{i+1}, b_{i+1}, p_i), c_i)
// The second form is the look-ahead expression g_{i+1} + p_{i+1}g_i +
// p_{i+1}p_i c_i rewritten with majority-logic identities, so the incoming
// carry c_i reaches c_{i+2} through a single majority gate instead of the two
// a plain ripple chain needs. Both formulas follow the published design.
// Combinational; interface: operand bits a[1:0], b[1:0], carry in c_in,
// carries out c_mid (c_{i+1}) and c_out (c_{i+2}).
module qca_carry2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       c_in,
  output logic       c_mid,
  output logic       c_out
);
  logic p0, g0, m_g, m_p;

  qca_maj u_p0  (.a(a[0]), .b(b[0]), .c(1'b1), .m(p0));
  qca_maj u_g0  (.a(a[0]), .b(b[0]), .c(1'b0), .m(g0));
  qca_maj u_c1  (.a(p0),   .b(g0),   .c(c_in), .m(c_mid));
  qca_maj u_mg  (.a(a[1]), .b(b[1]), .c(g0),   .m(m_g));
  qca_maj u_mp  (.a(a[1]), .b(b[1]), .c(p0),   .m(m_p));
  qca_maj u_c2  (.a(m_g),  .b(m_p),  .c(c_in), .m(c_out));
endmodule
