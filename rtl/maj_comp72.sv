// maj_comp72: approximate 7:2 compressor made of four cascaded majority gates.
//
//   m1    = Maj(x7, x6, ~cin1)
//   m2    = Maj(~m1, x5, ~cin2)
//   m3    = Maj(~m2, x4, x3)
//   Sum   = Maj(~m3, x1, x2)
//   Carry = x6,  Cout1 = x5,  Cout2 = x4     (all of double weight)
// The gate chain, the inputs of each layer and the three pass-through outputs follow the
// drawing of the circuit. The final layer is left uncomplemented, as in the 4:2 and 5:2
// versions: a complemented Sum would give 1 for all-zero inputs and so a non-zero product
// for a zero operand. cin1/cin2 come from Cout1/Cout2 of the compressor one column down.
// Combinational.
module maj_comp72 (
  input  logic x1, x2, x3, x4, x5, x6, x7,
  input  logic cin1, cin2,
  output logic sum,
  output logic carry,
  output logic cout1,
  output logic cout2
);
  logic m1, m2, m3;
  maj3 u_m1 (.a(x7),  .b(x6), .c(~cin1), .y(m1));
  maj3 u_m2 (.a(~m1), .b(x5), .c(~cin2), .y(m2));
  maj3 u_m3 (.a(~m2), .b(x4), .c(x3),    .y(m3));
  maj3 u_m4 (.a(~m3), .b(x1), .c(x2),    .y(sum));
  assign carry = x6;
  assign cout1 = x5;
  assign cout2 = x4;
endmodule
