// qca_sum -- sum block of the majority-gate adder.
//
// Once the carry chain has produced every carry c_N..c_0, each sum bit is
//   s_i = M(~c_{i+1}, c_i, M(a_i, b_i, ~c_i))
// i.e. two majority gates and one inverter behind the carry, which is the
// cost the published design quotes for its sum block. The exact gate
// arrangement is this design's choice (the common QCA full-adder sum form).
// Combinational; N operand bits in, carries c[N:0] in, N sum bits out.
module qca_sum #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N:0]   c,
  output logic [N-1:0] s
);
  for (genvar i = 0; i < N; i++) begin : g_bit
    logic t;
    qca_maj u_t (.a(a[i]),     .b(b[i]), .c(~c[i]), .m(t));
    qca_maj u_s (.a(~c[i+1]),  .b(c[i]), .c(t),     .m(s[i]));
  end
endmodule
