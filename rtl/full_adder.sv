// full_adder: exact full adder, s = a ^ b ^ ci, co = Maj(a, b, ci).
//
// The building block of the exact 4:2 and 5:2 compressors and of the second reduction
// stage. Combinational. The carry is written as a majority of the three inputs, which is
// the same function as the usual a.b + ci.(a ^ b).
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  maj3 u_carry (.a(a), .b(b), .c(ci), .y(co));
  assign s = a ^ b ^ ci;
endmodule
