// mac_operand_regs -- the two operand registers of the MAC unit.
//
// The first register (A) is reachable at two addresses: a write to its
// primary address starts a multiply-accumulate, a write to its alias address
// starts a multiply whose product does not touch the accumulator. A write to
// the second register (B) also starts a multiply only. Timing: a write
// presented with wr_en at a rising edge updates the register at that edge,
// and for the following cycle start is high (with accumulate saying which
// kind of operation), while op_a/op_b already show the new operands.
// Registers and the primary/alias addressing follow the published design;
// the address map, and that B writes do not accumulate, are this design's
// choices. Reset (asynchronous, active low) clears everything.
module mac_operand_regs
  import mac_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  mac_addr_e    wr_addr,
  input  logic [W-1:0] wr_data,
  output logic [W-1:0] op_a,
  output logic [W-1:0] op_b,
  output logic         start,
  output logic         accumulate
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_a       <= '0;
      op_b       <= '0;
      start      <= 1'b0;
      accumulate <= 1'b0;
    end else begin
      start      <= 1'b0;
      accumulate <= 1'b0;
      if (wr_en) begin
        unique case (wr_addr)
          ADDR_A: begin
            op_a       <= wr_data;
            start      <= 1'b1;
            accumulate <= 1'b1;
          end
          ADDR_A_ALIAS: begin
            op_a  <= wr_data;
            start <= 1'b1;
          end
          ADDR_B: begin
            op_b  <= wr_data;
            start <= 1'b1;
          end
          ADDR_NONE: ;
        endcase
      end
    end
  end

  // accumulate is only ever raised together with start (both reset to 0)
  assert property (@(posedge clk) accumulate |-> start);
endmodule
