// exact_comp52: exact 5:2 compressor built from three chained full adders.
//
// Seven bits of one column weight (x1..x5, cin1, cin2) are reduced to a Sum of the same
// weight and three bits of double weight:
//   x1 + ... + x5 + cin1 + cin2 = Sum + 2*(Carry + Cout1 + Cout2)
// FA1 adds x1..x3 (carry = Cout1), FA2 adds that sum, x4 and cin1 (carry = Cout2), FA3 adds
// that sum, x5 and cin2 (outputs Sum and Carry). Cout1 and Cout2 feed cin1 and cin2 of the
// compressor one column up. Structure and equations follow the design; combinational.
module exact_comp52 (
  input  logic x1, x2, x3, x4, x5,
  input  logic cin1, cin2,
  output logic sum,
  output logic carry,
  output logic cout1,
  output logic cout2
);
  logic s1, s2;
  full_adder u_fa1 (.a(x1), .b(x2), .ci(x3),   .s(s1),  .co(cout1));
  full_adder u_fa2 (.a(s1), .b(x4), .ci(cin1), .s(s2),  .co(cout2));
  full_adder u_fa3 (.a(s2), .b(x5), .ci(cin2), .s(sum), .co(carry));
endmodule
