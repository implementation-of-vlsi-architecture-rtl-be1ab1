// tb_mac_multiplier -- exhaustive check of the 8 x 8 signed multiplier (all
// 65536 operand pairs) and a random check of a 16 x 16 instance, against the
// simulator's signed multiplication.
module tb_mac_multiplier;
  logic [7:0]  x8, y8;
  logic [15:0] p8;
  logic [15:0] x16, y16;
  logic [31:0] p16;
  int          checks = 0, failures = 0;

  mac_multiplier             dut8  (.x(x8),  .y(y8),  .p(p8));
  mac_multiplier #(.W(16))   dut16 (.x(x16), .y(y16), .p(p16));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint r;
    for (int i = -128; i < 128; i++)
      for (int j = -128; j < 128; j++) begin
        x8 = 8'(i); y8 = 8'(j);
        #1;
        checks++;
        if ($signed(p8) !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL8 %0d * %0d = %0d", i, j, $signed(p8));
        end
      end
    for (int t = 0; t < 20000; t++) begin
      x16 = 16'($urandom); y16 = 16'($urandom);
      if (t == 0) begin x16 = 16'h8000; y16 = 16'h8000; end
      if (t == 1) begin x16 = 16'h8000; y16 = 16'h7FFF; end
      #1;
      r = longint'($signed(x16)) * longint'($signed(y16));
      checks++;
      if (p16 !== 32'(r)) begin
        failures++;
        if (failures < 10) $display("FAIL16 %h * %h = %h", x16, y16, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
