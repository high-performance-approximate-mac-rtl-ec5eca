// tb_exact_comp42: exhaustive check of the exact 4:2 compressor. For all 32 input patterns
// Sum + 2*(Carry + Cout) must equal the number of ones among x1..x4, cin, and Cout must be
// the carry of x1 + x2 + x3 alone (it may not depend on cin, so that a row of compressors
// has no ripple path).
module tb_exact_comp42;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  exact_comp42 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                    .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, got;
    for (int v = 0; v < 32; v++) begin
      {x1, x2, x3, x4, cin} = 5'(v);
      #1;
      ones = $countones(v);
      got  = int'(sum) + 2 * (int'(carry) + int'(cout));
      checks++;
      if (got != ones) begin
        failures++;
        $display("FAIL exact_comp42 in=%05b value %0d, expected %0d", v[4:0], got, ones);
      end
      checks++;
      if (cout !== ((int'(x1) + int'(x2) + int'(x3)) >= 2)) begin
        failures++;
        $display("FAIL exact_comp42 in=%05b cout=%b", v[4:0], cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
