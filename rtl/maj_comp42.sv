// maj_comp42: approximate 4:2 compressor made of two majority gates.
//
//   m1    = Maj(x3, x4, ~cin)
//   Sum   = Maj(~m1, x1, x2)
//   Carry = x4,  Cout = x3        (both of double weight)
// The carry outputs are input bits passed straight through; only Sum is computed. The
// result is therefore not an exact count of the inputs: it trades accuracy for two gates of
// logic. Equations and structure follow the design. Combinational.
module maj_comp42 (
  input  logic x1, x2, x3, x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic m1;
  maj3 u_m1 (.a(x3),  .b(x4), .c(~cin), .y(m1));
  maj3 u_m2 (.a(~m1), .b(x1), .c(x2),   .y(sum));
  assign carry = x4;
  assign cout  = x3;
endmodule
