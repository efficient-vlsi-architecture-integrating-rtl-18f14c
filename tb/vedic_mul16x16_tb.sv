// vedic_mul16x16_tb: end-to-end self-check of the 16-bit square circuit,
// the top of the design, at its only size (no parameters).
//  1. The six published 16-bit squaring vectors (15358, 444, 4445, 11360,
//     32102, 23409 and their squares, written out here as constants).
//  2. The square of every 16-bit value (a = b), 65536 cases.
//  3. 200000 random a, b pairs, to check the circuit as a general
//     multiplier too; the expected value is always a * b computed directly.
// It counts how often each carry path of the vertical-and-crosswise
// addition was used: the crosswise-sum carry (c1) and the low-sum carry
// (c2) of the top combining stage and of the 8-bit circuit that forms
// aH*bH, and fails for any that never occurred.
module vedic_mul16x16_tb;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;
  int top_c1 = 0, top_c2 = 0, sub_c1 = 0, sub_c2 = 0;

  localparam logic [15:0] VEC_A [6] = '{16'd15358, 16'd444, 16'd4445, 16'd11360, 16'd32102, 16'd23409};
  localparam logic [31:0] VEC_P [6] = '{32'd235868164, 32'd197136, 32'd19758025,
                                        32'd129049600, 32'd1030538404, 32'd547981281};

  vedic_mul16x16 dut (.a(a), .b(b), .p(p));

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    a = x;
    b = y;
    #1;
    checks++;
    if (p != 32'(x) * 32'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d got p=%0d", x, y, p);
    end
    if (dut.u_combine.c1)      top_c1++;
    if (dut.u_combine.c2)      top_c2++;
    if (dut.u_hh.u_combine.c1) sub_c1++;
    if (dut.u_hh.u_combine.c2) sub_c2++;
  endtask

  initial begin
    #10_000_000;
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
    for (int i = 0; i < 65536; i++) apply(16'(i), 16'(i));
    for (int i = 0; i < 200000; i++) apply(16'($urandom), 16'($urandom));
    checks++;
    if (top_c1 == 0 || top_c2 == 0 || sub_c1 == 0 || sub_c2 == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("carries: top c1=%0d c2=%0d, aH*bH c1=%0d c2=%0d", top_c1, top_c2, sub_c1, sub_c2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
