// tb_qca_sum -- checks the sum block on random operands. The carry vector
// fed to it is worked out bit by bit from the operands and a random carry
// into bit 0, and the sum bits must equal the integer sum a + b + c_0.
module tb_qca_sum;
  localparam int unsigned N = 16;
  logic [N-1:0] a, b, s;
  logic [N:0]   c;
  int           checks = 0, failures = 0;

  qca_sum dut (.a, .b, .c, .s);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N:0] ref_sum;
    for (int t = 0; t < 5000; t++) begin
      a    = N'($urandom);
      b    = N'($urandom);
      c[0] = 1'($urandom);
      if (t == 0) begin a = '1; b = '0; c[0] = 1'b1; end
      if (t == 1) begin a = '1; b = '1; c[0] = 1'b1; end
      for (int i = 0; i < N; i++) begin
        c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
      end
      #1;
      ref_sum = (N+1)'(a) + (N+1)'(b) + (N+1)'(c[0]);
      checks++;
      if (s !== ref_sum[N-1:0]) begin
        failures++;
        $display("FAIL a=%h b=%h c0=%b s=%h expected %h", a, b, c[0], s, ref_sum[N-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
