// tb_maj_comp72: exhaustive check (512 patterns) of the majority-logic 7:2 compressor.
// The reference evaluates each majority layer by counting ones:
//   m1 = Maj(x7, x6, ~cin1), m2 = Maj(~m1, x5, ~cin2), m3 = Maj(~m2, x4, x3),
//   Sum = Maj(~m3, x1, x2), Carry = x6, Cout1 = x5, Cout2 = x4.
// Also checks Sum = 0 for all-zero inputs.
module tb_maj_comp72;
  logic x1, x2, x3, x4, x5, x6, x7, cin1, cin2, sum, carry, cout1, cout2;
  int checks = 0, failures = 0;

  maj_comp72 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .x5(x5), .x6(x6), .x7(x7),
                  .cin1(cin1), .cin2(cin2),
                  .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2));

  function automatic logic vote(input logic p, input logic q, input logic r);
    return (int'(p) + int'(q) + int'(r)) >= 2;
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic m1, m2, m3, es;
    for (int v = 0; v < 512; v++) begin
      {x1, x2, x3, x4, x5, x6, x7, cin1, cin2} = 9'(v);
      #1;
      m1 = vote(x7, x6, !cin1);
      m2 = vote(!m1, x5, !cin2);
      m3 = vote(!m2, x4, x3);
      es = vote(!m3, x1, x2);
      checks++;
      if ({sum, carry, cout1, cout2} !== {es, x6, x5, x4}) begin
        failures++;
        $display("FAIL maj_comp72 in=%09b got %b%b%b%b expected %b%b%b%b", v[8:0],
                 sum, carry, cout1, cout2, es, x6, x5, x4);
      end
    end
    {x1, x2, x3, x4, x5, x6, x7, cin1, cin2} = '0;
    #1;
    checks++;
    if (sum !== 1'b0) begin
      failures++;
      $display("FAIL maj_comp72 all-zero input gives sum=1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
