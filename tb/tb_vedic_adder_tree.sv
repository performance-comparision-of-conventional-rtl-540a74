// Self-checking testbench for vedic_adder_tree at its default H = 2 (the
// local H below must match that default).
//
// The tree must return q_hh*2^(2H) + (q_hl + q_lh)*2^H + q_ll for any four
// sub-products that can arise from H x H multiplies. The testbench runs
// every combination of such sub-products (each drawn from the products of
// two H-bit values) and compares p with that weighted sum computed as an
// integer. It also counts how often the crosswise adder carried out and how
// often the final adder's carry reached the top product bit, failing if
// either never happened. A clock-driven watchdog ends a stalled run.
module tb_vedic_adder_tree;
  localparam int unsigned H = 2;
  localparam int unsigned M = 1 << H;   // values of one H-bit operand

  logic             clk;
  logic [2*H-1:0]   q_ll, q_hl, q_lh, q_hh;
  logic [4*H-1:0]   p;
  int               checks = 0, failures = 0;
  int               cross_carry = 0, top_bit = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  vedic_adder_tree dut (
    .q_ll(q_ll), .q_hl(q_hl), .q_lh(q_lh), .q_hh(q_hh), .p(p)
  );

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Each sub-product index k selects the product (k / M) * (k % M).
  function automatic int unsigned subprod(int unsigned k);
    return (k / M) * (k % M);
  endfunction

  initial begin : stimulus
    int unsigned expect_v;
    for (int unsigned i0 = 0; i0 < M * M; i0++)
      for (int unsigned i1 = 0; i1 < M * M; i1++)
        for (int unsigned i2 = 0; i2 < M * M; i2++)
          for (int unsigned i3 = 0; i3 < M * M; i3++) begin
            q_ll = (2 * H)'(subprod(i0));
            q_hl = (2 * H)'(subprod(i1));
            q_lh = (2 * H)'(subprod(i2));
            q_hh = (2 * H)'(subprod(i3));
            #1;
            expect_v = (int'(q_hh) << (2 * H)) + ((int'(q_hl) + int'(q_lh)) << H)
                       + int'(q_ll);
            checks++;
            if (p !== (4 * H)'(expect_v)) begin
              failures++;
              if (failures <= 10)
                $display("FAIL ll=%0d hl=%0d lh=%0d hh=%0d: got %0d expected %0d",
                         q_ll, q_hl, q_lh, q_hh, p, expect_v);
            end
            if (int'(q_hl) + int'(q_lh) >= (1 << (2 * H))) cross_carry++;
            if (expect_v >= (1 << (4 * H - 1))) top_bit++;
          end
    checks++;
    if (cross_carry == 0 || top_bit == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: cross_carry=%0d top_bit=%0d",
               cross_carry, top_bit);
    end
    $display("crosswise carry seen %0d times, top product bit set %0d times",
             cross_carry, top_bit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
