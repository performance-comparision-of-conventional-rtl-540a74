// End-to-end testbench for vedic8, the 8x8 Vedic multiplier, at its
// default (and only) size.
//
// First the reference vector a = 8'hff, b = 8'hfe, n = 16'hfd02 is checked,
// then all 65536 operand pairs, each compared with a * b computed as an
// integer product. The design is combinational, so each result is sampled
// 1 ns after its operands change. The testbench counts how often each
// carry path of the adder hierarchy was taken, computed from the operands:
//   - the crosswise adder of the 8x8 tree carrying out of 8 bits;
//   - the crosswise adder of some 4x4 sub-multiplier carrying out of 4 bits;
//   - the product needing all 16 bits;
//   - a zero operand;
// and counts a failure for any that never occurred. A clock-driven watchdog
// ends a stalled run.
module tb_vedic8;
  logic        clk;
  logic [7:0]  a, b;
  logic [15:0] n;
  int          checks = 0, failures = 0;
  int          cross8 = 0, cross4 = 0, top_bit = 0, zero_op = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  vedic8 dut (.a(a), .b(b), .n(n));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // True if the crosswise sub-products of a 4x4 multiply of x and y
  // overflow 4 bits.
  function automatic bit cross4_carry(logic [3:0] x, logic [3:0] y);
    return int'(x[3:2]) * int'(y[1:0]) + int'(x[1:0]) * int'(y[3:2]) >= 16;
  endfunction

  task automatic check(input logic [7:0] av, input logic [7:0] bv);
    int unsigned expect_v;
    a = av;
    b = bv;
    #1;
    expect_v = int'(av) * int'(bv);
    checks++;
    if (n !== 16'(expect_v)) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %0d * %0d: got %0d expected %0d", av, bv, n, expect_v);
    end
    if (int'(av[7:4]) * int'(bv[3:0]) + int'(av[3:0]) * int'(bv[7:4]) >= 256)
      cross8++;
    if (cross4_carry(av[3:0], bv[3:0]) || cross4_carry(av[7:4], bv[3:0]) ||
        cross4_carry(av[3:0], bv[7:4]) || cross4_carry(av[7:4], bv[7:4]))
      cross4++;
    if (expect_v >= 32768) top_bit++;
    if (av == 0 || bv == 0) zero_op++;
  endtask

  initial begin : stimulus
    check(8'hff, 8'hfe);
    checks++;
    if (n !== 16'hfd02) begin
      failures++;
      $display("FAIL reference vector ff * fe gave %h", n);
    end
    for (int unsigned i = 0; i < 65536; i++)
      check(i[15:8], i[7:0]);
    checks++;
    if (cross8 == 0 || cross4 == 0 || top_bit == 0 || zero_op == 0) begin
      failures++;
      $display("FAIL mechanism not exercised");
    end
    $display("8x8 crosswise carry %0d, 4x4 crosswise carry %0d, 16-bit product %0d, zero operand %0d",
             cross8, cross4, top_bit, zero_op);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
