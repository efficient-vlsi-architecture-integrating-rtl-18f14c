// vedic_mul8x8_tb: self-check of the 8-bit square circuit. First the six
// published 8-bit squaring vectors (131, 192, 48, 64, 24, 152 and their
// squares, written out here as constants), then every one of the 65536
// operand pairs compared with a * b. It counts the crosswise and low
// carries of the top combining stage and fails if either never occurred.
module vedic_mul8x8_tb;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0, c1_seen = 0, c2_seen = 0;

  localparam logic [7:0]  VEC_A [6] = '{8'd131, 8'd192, 8'd48, 8'd64, 8'd24, 8'd152};
  localparam logic [15:0] VEC_P [6] = '{16'd17161, 16'd36864, 16'd2304, 16'd4096, 16'd576, 16'd23104};

  vedic_mul8x8 dut (.a(a), .b(b), .p(p));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) begin
      a = VEC_A[i];
      b = VEC_A[i];
      #1;
      checks++;
      if (p != VEC_P[i]) begin
        failures++;
        $display("FAIL square of %0d: got %0d expected %0d", a, p, VEC_P[i]);
      end
    end
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      checks++;
      if (p != 16'(a) * 16'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d got p=%0d", a, b, p);
      end
      if (dut.u_combine.c1) c1_seen++;
      if (dut.u_combine.c2) c2_seen++;
    end
    checks++;
    if (c1_seen == 0 || c2_seen == 0) begin
      failures++;
      $display("FAIL coverage: c1=%0d c2=%0d", c1_seen, c2_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
