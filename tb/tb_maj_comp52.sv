// tb_maj_comp52: exhaustive check of the majority-logic 5:2 compressor. The reference
// evaluates each majority layer by counting ones (at least two of three):
//   m1 = Maj(x5, x4, ~cin1), m2 = Maj(~m1, x3, ~cin2), Sum = Maj(~m2, x1, x2),
//   Carry = x5, Cout1 = x4, Cout2 = x3.
module tb_maj_comp52;
  logic x1, x2, x3, x4, x5, cin1, cin2, sum, carry, cout1, cout2;
  int checks = 0, failures = 0;

  maj_comp52 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .x5(x5), .cin1(cin1), .cin2(cin2),
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
    logic m1, m2, es;
    for (int v = 0; v < 128; v++) begin
      {x1, x2, x3, x4, x5, cin1, cin2} = 7'(v);
      #1;
      m1 = vote(x5, x4, !cin1);
      m2 = vote(!m1, x3, !cin2);
      es = vote(!m2, x1, x2);
      checks++;
      if ({sum, carry, cout1, cout2} !== {es, x5, x4, x3}) begin
        failures++;
        $display("FAIL maj_comp52 in=%07b got %b%b%b%b expected %b%b%b%b", v[6:0],
                 sum, carry, cout1, cout2, es, x5, x4, x3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
