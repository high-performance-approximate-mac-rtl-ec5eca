// exact_comp42: exact 4:2 compressor built from two full adders.
//
// Five bits of one column weight (x1..x4 and cin from the neighbouring compressor) are
// reduced to a Sum of the same weight and two bits of double weight, Carry and Cout:
//   x1 + x2 + x3 + x4 + cin = Sum + 2*(Carry + Cout)
// The first full adder adds x1, x2, x3 and gives Cout; the second adds that sum, x4 and cin
// and gives Sum and Carry. Cout does not depend on cin, so a row of these compressors has no
// ripple path. Structure and equations follow the design; it is combinational.
module exact_comp42 (
  input  logic x1, x2, x3, x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;
  full_adder u_fa1 (.a(x1), .b(x2), .ci(x3),  .s(s1),  .co(cout));
  full_adder u_fa2 (.a(s1), .b(x4), .ci(cin), .s(sum), .co(carry));
endmodule
