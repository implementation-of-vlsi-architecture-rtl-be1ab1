// tb_mac_operand_regs -- random writes to all four addresses. After every
// edge the registers must hold the last value written to them, and start /
// accumulate must be a one-cycle pulse telling which address was written in
// the previous cycle (accumulate only for the first register's primary
// address, nothing for the unused address).
module tb_mac_operand_regs;
  import mac_pkg::*;
  localparam int unsigned W = 8;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         wr_en = 1'b0;
  mac_addr_e    wr_addr = ADDR_A;
  logic [W-1:0] wr_data = '0;
  logic [W-1:0] op_a, op_b;
  logic         start, accumulate;
  int           checks = 0, failures = 0;

  mac_operand_regs dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic [W-1:0] ma = '0, mb = '0;
    logic         exp_start, exp_acc;
    int           n_mac = 0, n_alias = 0, n_b = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    expect_eq("reset op_a", int'(op_a), 0);
    expect_eq("reset start", int'(start), 0);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      wr_en   = ($urandom % 3) != 0;
      wr_addr = mac_addr_e'($urandom % 4);
      wr_data = W'($urandom);
      exp_start = 1'b0;
      exp_acc   = 1'b0;
      if (wr_en) begin
        unique case (wr_addr)
          ADDR_A:       begin ma = wr_data; exp_start = 1'b1; exp_acc = 1'b1; n_mac++; end
          ADDR_A_ALIAS: begin ma = wr_data; exp_start = 1'b1; n_alias++; end
          ADDR_B:       begin mb = wr_data; exp_start = 1'b1; n_b++; end
          ADDR_NONE:    ;
        endcase
      end
      @(posedge clk);
      #1;
      expect_eq("op_a", int'(op_a), int'(ma));
      expect_eq("op_b", int'(op_b), int'(mb));
      expect_eq("start", int'(start), int'(exp_start));
      expect_eq("accumulate", int'(accumulate), int'(exp_acc));
    end
    if (n_mac == 0 || n_alias == 0 || n_b == 0) begin
      failures++;
      $display("FAIL some address never written");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
