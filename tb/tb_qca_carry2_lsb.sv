// tb_qca_carry2_lsb -- exhaustive check of the least-significant 2-bit carry
// slice (no carry input): c_1 and c_2 must be bits of a0+b0 and a+b.
module tb_qca_carry2_lsb;
  logic [1:0] a, b;
  logic       c_mid, c_out;
  int         checks = 0, failures = 0;

  qca_carry2_lsb dut (.a, .b, .c_mid, .c_out);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lo, full;
    for (int v = 0; v < 16; v++) begin
      {a, b} = 4'(v);
      #1;
      lo   = int'(a[0]) + int'(b[0]);
      full = int'(a) + int'(b);
      checks += 2;
      if (c_mid !== lo[1]) begin
        failures++;
        $display("FAIL c_mid a=%b b=%b got %b", a, b, c_mid);
      end
      if (c_out !== full[2]) begin
        failures++;
        $display("FAIL c_out a=%b b=%b got %b", a, b, c_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
