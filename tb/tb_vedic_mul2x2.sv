// Self-checking testbench for the 2x2 Vedic multiply block.
//
// All 16 operand pairs are applied and p is compared with a * b computed as
// an integer product. The case 3 * 3 = 9 is the only one where the crosswise
// carry reaches the top bit; the testbench counts it and fails if it never
// occurred. A clock-driven watchdog ends a stalled run.
module tb_vedic_mul2x2;
  logic       clk;
  logic [1:0] a, b;
  logic [3:0] p;
  int         checks = 0, failures = 0;
  int         top_bit_set = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  vedic_mul2x2 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int unsigned expect_v;
    for (int unsigned i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      expect_v = int'(a) * int'(b);
      checks++;
      if (p !== 4'(expect_v)) begin
        failures++;
        $display("FAIL %0d * %0d: got %0d expected %0d", a, b, p, expect_v);
      end
      if (expect_v >= 8) top_bit_set++;
    end
    checks++;
    if (top_bit_set == 0) begin
      failures++;
      $display("FAIL carry into product bit 3 never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
