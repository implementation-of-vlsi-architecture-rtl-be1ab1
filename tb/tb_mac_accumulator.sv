// tb_mac_accumulator -- random accumulation with occasional clears against
// a reference model kept in a wider integer: acc must equal the reference
// modulo 2^16, and the sticky overflow flag must rise exactly when some step
// left the signed 16-bit range. Counts positive and negative overflows and
// clears; a kind that never happens is a failure.
module tb_mac_accumulator;
  localparam int unsigned N = 16;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         clr = 1'b0, en = 1'b0;
  logic [N-1:0] addend = '0;
  logic [N-1:0] acc;
  logic         ovf;
  int           checks = 0, failures = 0;

  mac_accumulator dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  ref_acc = 0;        // always kept inside the signed 16-bit range
    bit  ref_ovf = 0;
    int  n_pos = 0, n_neg = 0, n_clr = 0;
    int  next;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      clr    = ($urandom % 97) == 0;
      en     = ($urandom % 4) != 0;
      // mostly large addends so that overflow happens often
      addend = N'($urandom);
      if (clr) begin
        ref_acc = 0;
        ref_ovf = 0;
        n_clr++;
      end else if (en) begin
        next = ref_acc + int'($signed(addend));
        if (next > 32767)  begin ref_ovf = 1; n_pos++; next -= 65536; end
        if (next < -32768) begin ref_ovf = 1; n_neg++; next += 65536; end
        ref_acc = next;
      end
      @(posedge clk);
      #1;
      checks += 2;
      if (int'($signed(acc)) != ref_acc) begin
        failures++;
        $display("FAIL acc %0d expected %0d", $signed(acc), ref_acc);
      end
      if (ovf != ref_ovf) begin
        failures++;
        $display("FAIL ovf %0b expected %0b", ovf, ref_ovf);
      end
    end
    $display("positive overflows=%0d negative overflows=%0d clears=%0d", n_pos, n_neg, n_clr);
    if (n_pos == 0 || n_neg == 0 || n_clr == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
