// full_adder_tb: exhaustive self-check of full_adder. All eight input
// combinations are applied; {cout, sum} must equal a + b + cin.
// A watchdog ends the run with a failure if it hangs.
module full_adder_tb;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      checks++;
      if ({cout, sum} != 2'(a + b + cin)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b got cout=%0b sum=%0b", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
