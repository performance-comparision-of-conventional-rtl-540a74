// Self-checking testbench for the 4x4 Vedic multiplier.
//
// All 256 operand pairs are applied and p is compared with a * b computed as
// an integer product. Counts the cases where the two crosswise 2x2 products
// sum past 4 bits (the crosswise adder's carry) and where the product needs
// all 8 bits; fails if either never happened. A clock-driven watchdog ends a
// stalled run.
module tb_vedic_mul4x4;
  logic       clk;
  logic [3:0] a, b;
  logic [7:0] p;
  int         checks = 0, failures = 0;
  int         cross_carry = 0, top_bit = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  vedic_mul4x4 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int unsigned expect_v;
    for (int unsigned i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      expect_v = int'(a) * int'(b);
      checks++;
      if (p !== 8'(expect_v)) begin
        failures++;
        if (failures <= 10)
          $display("FAIL %0d * %0d: got %0d expected %0d", a, b, p, expect_v);
      end
      if (int'(a[3:2]) * int'(b[1:0]) + int'(a[1:0]) * int'(b[3:2]) >= 16)
        cross_carry++;
      if (expect_v >= 128) top_bit++;
    end
    checks++;
    if (cross_carry == 0 || top_bit == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: cross_carry=%0d top_bit=%0d",
               cross_carry, top_bit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
