// tb_maj_comp42: exhaustive check of the majority-logic 4:2 compressor against its
// two-level sum-of-products form
//   Sum = ~(x3.x4 + x4.~cin + x3.~cin).(x1 + x2) + x1.x2,  Carry = x4,  Cout = x3.
// Also checks that Sum is 0 for all-zero inputs (cin = 0).
module tb_maj_comp42;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  logic exp_sum;
  int checks = 0, failures = 0;

  maj_comp42 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                  .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {x1, x2, x3, x4, cin} = 5'(v);
      #1;
      exp_sum = (~((x3 & x4) | (x4 & ~cin) | (x3 & ~cin)) & (x1 | x2)) | (x1 & x2);
      checks++;
      if ({sum, carry, cout} !== {exp_sum, x4, x3}) begin
        failures++;
        $display("FAIL maj_comp42 in=%05b got s/c/co=%b%b%b expected %b%b%b",
                 v[4:0], sum, carry, cout, exp_sum, x4, x3);
      end
    end
    {x1, x2, x3, x4, cin} = '0;
    #1;
    checks++;
    if (sum !== 1'b0) begin
      failures++;
      $display("FAIL maj_comp42 all-zero input gives sum=1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
