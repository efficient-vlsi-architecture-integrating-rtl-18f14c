// half_adder_tb: exhaustive self-check of half_adder. All four input pairs
// are applied; {carry, sum} must equal a + b, computed here by integer
// addition. A watchdog ends the run with a failure if it hangs.
module half_adder_tb;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({carry, sum} != 2'(a + b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b got carry=%0b sum=%0b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
