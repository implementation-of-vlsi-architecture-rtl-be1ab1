// qca_carry2_lsb -- simplified 2-bit carry slice for bit positions 1..0.
//
// The adder has no carry input (c_0 = 0). With c_0 = 0 the general slice
// reduces to c_1 = g_0 = a_0 & b_0 and c_2 = M(a_1, b_1, g_0), so p_0 is not
// needed and c_2 is two majority gates deep. The simplification itself is
// stated by the published design; the reduced formulas are derived here from
// the general slice. Combinational; operand bits a[1:0], b[1:0], carries out
// c_mid (c_1) and c_out (c_2).
module qca_carry2_lsb (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic       c_mid,
  output logic       c_out
);
  logic g0;

  qca_maj u_g0 (.a(a[0]), .b(b[0]), .c(1'b0), .m(g0));
  qca_maj u_c2 (.a(a[1]), .b(b[1]), .c(g0),   .m(c_out));
  assign c_mid = g0;
endmodule
