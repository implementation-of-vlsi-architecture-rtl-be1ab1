// tb_qca_maj -- exhaustive check of the three-input majority gate against a
// count of ones (output is 1 when at least two inputs are 1).
module tb_qca_maj;
  logic a, b, c, m;
  int   checks = 0, failures = 0;

  qca_maj dut (.a, .b, .c, .m);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (m !== (int'(a) + int'(b) + int'(c) >= 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b m=%0b", a, b, c, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
