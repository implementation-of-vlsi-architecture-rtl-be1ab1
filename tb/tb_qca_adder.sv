// tb_qca_adder -- checks the majority-gate adder at its default 16-bit width
// (exhaustive over the low byte pairs plus random words and corner cases),
// and at 2 and 64 bits, against integer addition; sum and carry out.
module tb_qca_adder;
  logic [15:0] a16, b16, s16;
  logic        co16;
  logic [63:0] a64, b64, s64;
  logic        co64;
  logic [1:0]  a2, b2, s2;
  logic        co2;
  int          checks = 0, failures = 0;

  qca_adder              dut16 (.a(a16), .b(b16), .s(s16), .cout(co16));
  qca_adder #(.N(64))    dut64 (.a(a64), .b(b64), .s(s64), .cout(co64));
  qca_adder #(.N(2))     dut2  (.a(a2),  .b(b2),  .s(s2),  .cout(co2));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    logic [16:0] r;
    a16 = x; b16 = y;
    #1;
    r = 17'(x) + 17'(y);
    checks++;
    if ({co16, s16} !== r) begin
      failures++;
      $display("FAIL16 %h + %h = %b_%h expected %h", x, y, co16, s16, r);
    end
  endtask

  initial begin
    logic [64:0] r64;
    logic [2:0]  r2;
    // 16 bits: corner cases, full carry propagation from bit 0
    check16(16'hFFFF, 16'h0001);
    check16(16'hFFFF, 16'hFFFF);
    check16(16'h0000, 16'h0000);
    check16(16'h7FFF, 16'h0001);
    check16(16'h5555, 16'hAAAA);
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        check16(16'(x * 257), 16'(y * 129));
    for (int t = 0; t < 20000; t++) check16(16'($urandom), 16'($urandom));
    // 64 bits
    for (int t = 0; t < 2000; t++) begin
      a64 = {$urandom, $urandom};
      b64 = {$urandom, $urandom};
      if (t == 0) begin a64 = '1; b64 = 64'd1; end
      #1;
      r64 = 65'(a64) + 65'(b64);
      checks++;
      if ({co64, s64} !== r64) begin
        failures++;
        $display("FAIL64 %h + %h = %b_%h", a64, b64, co64, s64);
      end
    end
    // 2 bits, exhaustive
    for (int v = 0; v < 16; v++) begin
      {a2, b2} = 4'(v);
      #1;
      r2 = 3'(a2) + 3'(b2);
      checks++;
      if ({co2, s2} !== r2) begin
        failures++;
        $display("FAIL2 %b + %b = %b_%b", a2, b2, co2, s2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
