// tb_exact_comp52: exhaustive check of the exact 5:2 compressor. For all 128 input
// patterns Sum + 2*(Carry + Cout1 + Cout2) must equal the number of ones among x1..x5,
// cin1, cin2; Cout1 must be the carry of x1 + x2 + x3 and Cout2 must not depend on cin2.
module tb_exact_comp52;
  logic x1, x2, x3, x4, x5, cin1, cin2, sum, carry, cout1, cout2;
  int checks = 0, failures = 0;

  exact_comp52 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .x5(x5), .cin1(cin1), .cin2(cin2),
                    .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, got;
    logic c2_a;
    for (int v = 0; v < 128; v++) begin
      {x1, x2, x3, x4, x5, cin1, cin2} = 7'(v);
      #1;
      ones = $countones(v);
      got  = int'(sum) + 2 * (int'(carry) + int'(cout1) + int'(cout2));
      checks++;
      if (got != ones) begin
        failures++;
        $display("FAIL exact_comp52 in=%07b value %0d, expected %0d", v[6:0], got, ones);
      end
      checks++;
      if (cout1 !== ((int'(x1) + int'(x2) + int'(x3)) >= 2)) begin
        failures++;
        $display("FAIL exact_comp52 in=%07b cout1=%b", v[6:0], cout1);
      end
      c2_a = cout2;
      cin2 = ~cin2;
      #1;
      checks++;
      if (cout2 !== c2_a) begin
        failures++;
        $display("FAIL exact_comp52 in=%07b cout2 depends on cin2", v[6:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
