// vedic_mul4x4_tb: exhaustive self-check of the 4-bit square circuit. All
// 256 operand pairs are applied and p is compared with a * b; the 16
// squares are among them. It counts the cases where the combining stage's
// crosswise sum carries out and fails if there were none.
module vedic_mul4x4_tb;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0, cross_carries = 0;

  vedic_mul4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      checks++;
      if (p != 8'(a * b)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d got p=%0d", a, b, p);
      end
      if (dut.u_combine.c1) cross_carries++;
    end
    checks++;
    if (cross_carries == 0) begin
      failures++;
      $display("FAIL no crosswise carry exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
