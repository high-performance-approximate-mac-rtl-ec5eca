// maj_comp52: approximate 5:2 compressor made of three cascaded majority gates.
//
//   m1    = Maj(x5, x4, ~cin1)
//   m2    = Maj(~m1, x3, ~cin2)
//   Sum   = Maj(~m2, x1, x2)
//   Carry = x5,  Cout1 = x4,  Cout2 = x3     (all of double weight)
// Each layer's output is complemented before the next layer, as in the 4:2 version. The
// carry outputs are input bits passed through; cin1/cin2 come from Cout1/Cout2 of the
// compressor one column down. The gate chain and the pass-through outputs follow the design;
// where its printed equation omits the complement of the first layer, the drawing of the
// circuit, which shows it, was followed. Combinational.
module maj_comp52 (
  input  logic x1, x2, x3, x4, x5,
  input  logic cin1, cin2,
  output logic sum,
  output logic carry,
  output logic cout1,
  output logic cout2
);
  logic m1, m2;
  maj3 u_m1 (.a(x5),  .b(x4), .c(~cin1), .y(m1));
  maj3 u_m2 (.a(~m1), .b(x3), .c(~cin2), .y(m2));
  maj3 u_m3 (.a(~m2), .b(x1), .c(x2),    .y(sum));
  assign carry = x5;
  assign cout1 = x4;
  assign cout2 = x3;
endmodule
