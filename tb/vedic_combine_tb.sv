// vedic_combine_tb: self-check of the block-level vertical/crosswise adder
// stage. Two instances are tested: H = 2 (the 4-bit case), fed the four
// genuine 2x2 products of every 4-bit a, b pair, and H = 8 (the 16-bit
// case), fed the 8x8 products of every square a = b (65536) and of 100000
// random a, b pairs. The expected result is a * b computed directly.
// It counts the cases where the crosswise sum carries out (c1) and where
// adding the low vertical product's upper half carries out (c2), for the
// H = 8 stage, and fails if either never happened.
module vedic_combine_tb;
  logic [3:0]  s_a, s_b;
  logic [3:0]  s_q0, s_q1, s_q2, s_q3;
  logic [7:0]  s_p;
  logic [15:0] l_a, l_b;
  logic [15:0] l_q0, l_q1, l_q2, l_q3;
  logic [31:0] l_p;
  int checks = 0, failures = 0, c1_seen = 0, c2_seen = 0;

  vedic_combine #(.H(2)) dut_small (
    .q0(s_q0), .q1(s_q1), .q2(s_q2), .q3(s_q3), .p(s_p)
  );
  vedic_combine #(.H(8)) dut_large (
    .q0(l_q0), .q1(l_q1), .q2(l_q2), .q3(l_q3), .p(l_p)
  );

  task automatic check_large(input logic [15:0] x, input logic [15:0] y);
    l_a  = x;
    l_b  = y;
    l_q0 = 16'(x[7:0])  * 16'(y[7:0]);
    l_q1 = 16'(x[15:8]) * 16'(y[7:0]);
    l_q2 = 16'(x[7:0])  * 16'(y[15:8]);
    l_q3 = 16'(x[15:8]) * 16'(y[15:8]);
    #1;
    checks++;
    if (l_p != 32'(x) * 32'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL H=8 a=%0d b=%0d got %0d", x, y, l_p);
    end
    if (dut_large.c1) c1_seen++;
    if (dut_large.c2) c2_seen++;
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {s_a, s_b} = 8'(i);
      s_q0 = 4'(s_a[1:0] * s_b[1:0]);
      s_q1 = 4'(s_a[3:2] * s_b[1:0]);
      s_q2 = 4'(s_a[1:0] * s_b[3:2]);
      s_q3 = 4'(s_a[3:2] * s_b[3:2]);
      #1;
      checks++;
      if (s_p != 8'(s_a * s_b)) begin
        failures++;
        if (failures < 10) $display("FAIL H=2 a=%0d b=%0d got %0d", s_a, s_b, s_p);
      end
    end
    for (int i = 0; i < 65536; i++) check_large(16'(i), 16'(i));
    for (int i = 0; i < 100000; i++) check_large(16'($urandom), 16'($urandom));
    checks++;
    if (c1_seen == 0 || c2_seen == 0) begin
      failures++;
      $display("FAIL coverage: c1=%0d c2=%0d", c1_seen, c2_seen);
    end
    $display("crosswise carries: %0d, low carries: %0d", c1_seen, c2_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
