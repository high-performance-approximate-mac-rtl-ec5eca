// half_adder: exact half adder, s = a ^ b, co = a & b.
//
// Used in the reduction tree of the 8x8 multiplier where a column holds two bits that still
// have to be merged. Combinational. The design names half adders without drawing them; this
// is the textbook cell.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
