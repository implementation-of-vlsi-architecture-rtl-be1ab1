// mac_accumulator -- N-bit accumulator with signed-overflow detection.
//
// When en is high at a rising edge, acc becomes acc + addend, computed by the
// majority-gate qca_adder. Overflow is the signed rule: both operands have
// the same sign and the sum has the other sign. The sum then wraps, and the
// sticky flag ovf is set until clr or reset. clr (synchronous, priority over
// en) zeroes acc and ovf; rst_n is asynchronous and active low. The use of
// the published adder and the overflow rule follow the published design;
// width, wrap-around and the clear input are this design's choices.
module mac_accumulator #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [N-1:0] addend,
  output logic [N-1:0] acc,
  output logic         ovf
);
  logic [N-1:0] sum;
  logic         unused_cout;
  logic         step_ovf;

  qca_adder #(.N(N)) u_add (.a(acc), .b(addend), .s(sum), .cout(unused_cout));

  assign step_ovf = (acc[N-1] == addend[N-1]) && (sum[N-1] != acc[N-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      ovf <= 1'b0;
    end else if (clr) begin
      acc <= '0;
      ovf <= 1'b0;
    end else if (en) begin
      acc <= sum;
      ovf <= ovf | step_ovf;
    end
  end
endmodule
