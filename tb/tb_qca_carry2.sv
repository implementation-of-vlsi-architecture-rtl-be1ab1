// tb_qca_carry2 -- exhaustive check of the 2-bit carry slice: for every
// a[1:0], b[1:0], c_in the carries c_{i+1} and c_{i+2} must equal bits of
// the integer sums a0+b0+c_in and a+b+c_in.
module tb_qca_carry2;
  logic [1:0] a, b;
  logic       c_in, c_mid, c_out;
  int         checks = 0, failures = 0;

  qca_carry2 dut (.a, .b, .c_in, .c_mid, .c_out);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lo, full;
    for (int v = 0; v < 32; v++) begin
      {a, b, c_in} = 5'(v);
      #1;
      lo   = int'(a[0]) + int'(b[0]) + int'(c_in);
      full = int'(a) + int'(b) + int'(c_in);
      checks += 2;
      if (c_mid !== lo[1]) begin
        failures++;
        $display("FAIL c_mid a=%b b=%b cin=%b got %b", a, b, c_in, c_mid);
      end
      if (c_out !== full[2]) begin
        failures++;
        $display("FAIL c_out a=%b b=%b cin=%b got %b", a, b, c_in, c_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
