// tb_mac_unit -- end-to-end test of the MAC unit at its default size
// (8-bit signed operands, 16-bit accumulator).
//
// A directed part computes a short dot product, then shows that a multiply
// through the alias address leaves the accumulator alone. A random part then
// issues writes to every address (often back to back), clears and idle
// cycles. A reference model computes, at each write, the expected product,
// accumulator and overflow flag; each `done` pulse must arrive exactly two
// edges after the write edge and carry those values. Counted mechanisms:
// multiply-accumulate, alias multiply, B-register multiply, ignored write,
// back-to-back writes, overflow, clear. One that never happened is a failure.
module tb_mac_unit;
  import mac_pkg::*;
  localparam int unsigned W = 8;
  localparam int unsigned N = 16;
  localparam int          LATENCY = 2;   // write edge to done edge

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           wr_en = 1'b0;
  mac_addr_e      wr_addr = ADDR_A;
  logic [W-1:0]   wr_data = '0;
  logic           clr_acc = 1'b0;
  logic [2*W-1:0] product;
  logic [N-1:0]   acc;
  logic           ovf;
  logic           done;

  mac_unit dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    int          cyc;
    logic [15:0] prod;
    int          acc;
    bit          ovf;
  } expect_t;

  expect_t q[$];
  int      checks = 0, failures = 0;
  int      cyc = 0;

  // reference model state
  int      m_a = 0, m_b = 0, m_acc = 0;
  bit      m_ovf = 0;

  int n_mac = 0, n_alias = 0, n_bmul = 0, n_ignored = 0, n_b2b = 0, n_ovf = 0, n_clr = 0;
  bit prev_wr = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void model_write(mac_addr_e addr, logic [W-1:0] data);
    int p, next;
    expect_t e;
    case (addr)
      ADDR_A:       begin m_a = int'($signed(data)); n_mac++;   end
      ADDR_A_ALIAS: begin m_a = int'($signed(data)); n_alias++; end
      ADDR_B:       begin m_b = int'($signed(data)); n_bmul++;  end
      default:      begin n_ignored++; return; end
    endcase
    p = m_a * m_b;
    if (addr == ADDR_A) begin
      next = m_acc + p;
      if (next > 32767 || next < -32768) begin
        n_ovf++;
        m_ovf = 1;
        next = next > 32767 ? next - 65536 : next + 65536;
      end
      m_acc = next;
    end
    e.cyc  = cyc;
    e.prod = 16'(p);
    e.acc  = m_acc;
    e.ovf  = m_ovf;
    q.push_back(e);
  endfunction

  // one clock cycle: drive at the falling edge, check after the rising edge
  task automatic step(input bit we, input mac_addr_e addr, input logic [W-1:0] data,
                      input bit clr);
    @(negedge clk);
    wr_en   = we;
    wr_addr = addr;
    wr_data = data;
    clr_acc = clr;
    cyc++;
    if (we) begin
      if (prev_wr) n_b2b++;
      model_write(addr, data);
    end
    prev_wr = we;
    if (clr) begin
      m_acc = 0;
      m_ovf = 0;
      n_clr++;
    end
    @(posedge clk);
    #1;
    if (done) begin
      checks += 4;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL done without a pending operation at cycle %0d", cyc);
      end else begin
        expect_t e = q.pop_front();
        if (cyc - e.cyc != LATENCY) begin
          failures++;
          $display("FAIL latency %0d expected %0d", cyc - e.cyc, LATENCY);
        end
        if (product !== e.prod) begin
          failures++;
          $display("FAIL product %0d expected %0d", $signed(product), $signed(e.prod));
        end
        if (int'($signed(acc)) != e.acc) begin
          failures++;
          $display("FAIL acc %0d expected %0d at cycle %0d", $signed(acc), e.acc, cyc);
        end
        if (ovf != e.ovf) begin
          failures++;
          $display("FAIL ovf %0b expected %0b", ovf, e.ovf);
        end
      end
    end else if (q.size() != 0 && cyc - q[0].cyc >= LATENCY) begin
      checks++;
      failures++;
      $display("FAIL done missing for write at cycle %0d", q[0].cyc);
      void'(q.pop_front());
    end
  endtask

  task automatic idle(input int n);
    repeat (n) step(1'b0, ADDR_A, '0, 1'b0);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // directed: dot product (3*4) + (-5*6) + (7*-8) = 12 - 30 - 56 = -74
    step(1'b1, ADDR_B, 8'd4, 1'b0);
    step(1'b1, ADDR_A, 8'd3, 1'b0);
    step(1'b1, ADDR_B, 8'd6, 1'b0);
    step(1'b1, ADDR_A, -8'sd5, 1'b0);
    step(1'b1, ADDR_B, -8'sd8, 1'b0);
    step(1'b1, ADDR_A, 8'd7, 1'b0);
    idle(3);
    checks++;
    if (int'($signed(acc)) != -74) begin
      failures++;
      $display("FAIL dot product %0d expected -74", $signed(acc));
    end
    // multiply only through the alias address: product changes, acc not
    step(1'b1, ADDR_A_ALIAS, 8'd100, 1'b0);
    idle(3);
    checks += 2;
    if (int'($signed(product)) != -800 || int'($signed(acc)) != -74) begin
      failures += 2;
      $display("FAIL alias multiply product %0d acc %0d", $signed(product), $signed(acc));
    end
    step(1'b0, ADDR_A, '0, 1'b1);   // clear
    idle(1);

    // random traffic
    for (int t = 0; t < 30000; t++) begin
      int r;
      r = $urandom % 100;
      if (r < 2) begin
        idle(LATENCY + 1);            // drain the pipeline, then clear
        step(1'b0, ADDR_A, '0, 1'b1);
      end
      else if (r < 85)             step(1'b1, mac_addr_e'($urandom % 4), W'($urandom), 1'b0);
      else                         step(1'b0, ADDR_A, '0, 1'b0);
    end
    idle(4);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d operations never completed", q.size());
    end

    $display("mac=%0d alias=%0d bmul=%0d ignored=%0d back_to_back=%0d overflow=%0d clear=%0d",
             n_mac, n_alias, n_bmul, n_ignored, n_b2b, n_ovf, n_clr);
    checks++;
    if (n_mac == 0 || n_alias == 0 || n_bmul == 0 || n_ignored == 0 || n_b2b == 0 ||
        n_ovf == 0 || n_clr == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
