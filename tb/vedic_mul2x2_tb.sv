// vedic_mul2x2_tb: exhaustive self-check of the 2-bit Urdhva-Tiryagbhyam
// cell. All 16 operand pairs are applied and p is compared with a * b
// computed by the simulator; the four squares 0, 1, 4, 9 are among them.
// Also counts the cases where the crosswise half adder produces a carry
// into the top bit pair (a = b = 3) and fails if none was seen.
module vedic_mul2x2_tb;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0, cross_carries = 0, squares = 0;

  vedic_mul2x2 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      checks++;
      if (p != 4'(a * b)) begin
        failures++;
        $display("FAIL a=%0d b=%0d got p=%0d", a, b, p);
      end
      if (a == b) squares++;
      if (a[1] & b[0] & a[0] & b[1]) cross_carries++;
    end
    checks++;
    if (cross_carries == 0 || squares != 4) begin
      failures++;
      $display("FAIL coverage: cross carries=%0d squares=%0d", cross_carries, squares);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
