// ripple_adder_tb: self-check of ripple_adder at its default width (8):
// every a, b pair with both carry-in values (131072 cases), each compared
// with integer addition. It also counts the cases where the carry ripples
// through all bits (a + b + cin with a ^ b all ones and cin = 1) and fails
// if none was seen. A watchdog ends the run with a failure if it hangs.
module ripple_adder_tb;
  localparam int unsigned W = 8;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0, full_ripples = 0;

  ripple_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * W + 1)); i++) begin
      {a, b, cin} = (2 * W + 1)'(i);
      #1;
      checks++;
      if ({cout, sum} != (W + 1)'(a + b + cin)) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%0d b=%0d cin=%0b got %0d", a, b, cin, {cout, sum});
      end
      if (cin && ((a ^ b) == '1)) full_ripples++;
    end
    checks++;
    if (full_ripples == 0) begin
      failures++;
      $display("FAIL no full-length carry ripple exercised");
    end
    $display("full-length ripples: %0d", full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
