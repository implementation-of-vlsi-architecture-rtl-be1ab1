// qca_adder -- N-bit binary adder built from majority gates, ripple style
// with two bit positions per carry step.
//
// The carry chain is one simplified slice for bits 1..0 (no carry input)
// followed by N/2-1 cascaded 2-bit slices; each slice carries c_i to c_{i+2}
// through one majority gate. The sum block then forms every sum bit. Worst
// path, for a carry generated at bit 0 and propagated to the top:
// 2 + (N-2)/2 majority gates in the chain plus 2 gates and an inverter for
// the sum, (N/2)+3 gates in all. Structure and the 16-bit default follow the
// published design. Combinational: s = (a + b) mod 2^N, cout = carry out of
// bit N-1. N must be even and at least 2.
module qca_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0] c;

  assign c[0] = 1'b0;

  qca_carry2_lsb u_lsb (.a(a[1:0]), .b(b[1:0]), .c_mid(c[1]), .c_out(c[2]));

  for (genvar k = 1; k < N / 2; k++) begin : g_slice
    qca_carry2 u_slice (
      .a    (a[2*k+1:2*k]),
      .b    (b[2*k+1:2*k]),
      .c_in (c[2*k]),
      .c_mid(c[2*k+1]),
      .c_out(c[2*k+2])
    );
  end

  qca_sum #(.N(N)) u_sum (.a(a), .b(b), .c(c), .s(s));

  assign cout = c[N];

  initial begin
    assert (N >= 2 && N % 2 == 0) else $fatal(1, "qca_adder: N must be even and >= 2");
  end
endmodule
