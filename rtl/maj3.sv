// maj3: three-input majority gate, Maj(A,B,C) = A.B + B.C + C.A.
//
// The basic cell of the majority-logic compressors. Purely combinational, no timing of its
// own. The equation is the design's; nothing here is a local choice.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = (a & b) | (b & c) | (c & a);
endmodule
