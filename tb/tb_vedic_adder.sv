// Self-checking testbench for vedic_adder at its default width (W = 6;
// the local W below must match that default).
//
// Applies every combination of x, y and cin (2^13 vectors) and compares
// {cout, sum} with x + y + cin computed in a wider integer. Also counts the
// vectors where the carry ripples through every bit (x ^ y all ones, cin = 1)
// and where cout is set, and fails if either never happened. A free-running
// clock paces a watchdog that ends the run if it stalls.
module tb_vedic_adder;
  localparam int unsigned W = 6;

  logic         clk;
  logic [W-1:0] x, y, sum;
  logic         cin, cout;
  int           checks = 0, failures = 0;
  int           full_ripple = 0, carry_out = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  vedic_adder dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int unsigned expect_v;
    for (int unsigned i = 0; i < (1 << (2 * W + 1)); i++) begin
      {cin, x, y} = (2 * W + 1)'(i);
      #1;
      expect_v = int'(x) + int'(y) + int'(cin);
      checks++;
      if ({cout, sum} !== (W + 1)'(expect_v)) begin
        failures++;
        if (failures <= 10)
          $display("FAIL x=%0d y=%0d cin=%0d: got %0d expected %0d",
                   x, y, cin, {cout, sum}, expect_v);
      end
      if ((x ^ y) == {W{1'b1}} && cin) full_ripple++;
      if (expect_v >= (1 << W)) carry_out++;
    end
    checks++;
    if (full_ripple == 0 || carry_out == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: full_ripple=%0d carry_out=%0d",
               full_ripple, carry_out);
    end
    $display("full carry ripple seen %0d times, carry out seen %0d times",
             full_ripple, carry_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
