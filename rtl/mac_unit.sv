// mac_unit -- multiply-accumulate unit around the majority-gate adder.
//
// Datapath: mac_operand_regs holds operands A and B; mac_multiplier (Booth
// rows summed by qca_adder instances) forms A*B; a product register lets the
// multiplier settle before the accumulator, mac_accumulator (a qca_adder plus
// overflow check), adds the sign-extended product.
// Operation: write B (address ADDR_B), then write A at ADDR_A for
// acc += A*B, or at ADDR_A_ALIAS for a multiply that leaves acc untouched.
// Every write also refreshes `product`. Timing: a write at rising edge t is
// in the operand registers after t, the product is registered at edge t+1,
// and `product` and acc (for a MAC) are updated at edge t+2; done is high
// for the cycle after edge t+2, when both hold the result of that write.
// Back-to-back writes, one per cycle, are accepted. clr_acc clears acc and ovf synchronously.
// The block structure follows the published design; widths (8-bit operands,
// 16-bit accumulator equal to the adder width), the pipeline and the address
// map are this design's choices. Requires N >= 2W.
module mac_unit
  import mac_pkg::*;
#(
  parameter int unsigned W = 8,
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           wr_en,
  input  mac_addr_e      wr_addr,
  input  logic [W-1:0]   wr_data,
  input  logic           clr_acc,
  output logic [2*W-1:0] product,
  output logic [N-1:0]   acc,
  output logic           ovf,
  output logic           done
);
  logic [W-1:0]   op_a, op_b;
  logic           start, accumulate;
  logic [2*W-1:0] mul_p;
  logic [2*W-1:0] prod_s1;
  logic           acc_en;
  logic           s1_valid;

  mac_operand_regs #(.W(W)) u_regs (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data,
    .op_a, .op_b, .start, .accumulate
  );

  mac_multiplier #(.W(W)) u_mul (.x(op_a), .y(op_b), .p(mul_p));

  // stage 1: product register between multiplier and accumulator;
  // stage 2: product output, updated at the edge the accumulator adds
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_s1  <= '0;
      acc_en   <= 1'b0;
      s1_valid <= 1'b0;
      product  <= '0;
      done     <= 1'b0;
    end else begin
      if (start) prod_s1 <= mul_p;
      acc_en   <= start & accumulate;
      s1_valid <= start;
      if (s1_valid) product <= prod_s1;
      done     <= s1_valid;
    end
  end

  mac_accumulator #(.N(N)) u_acc (
    .clk, .rst_n,
    .clr   (clr_acc),
    .en    (acc_en),
    .addend(N'($signed(prod_s1))),
    .acc, .ovf
  );

  initial begin
    assert (N >= 2 * W) else $fatal(1, "mac_unit: N must be at least 2W");
  end
endmodule
