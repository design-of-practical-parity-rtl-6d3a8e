// xor2_maj: two-input XOR made of three majority gates and one inverter.
// One majority gate with a fixed 0 input forms A AND B, another with a fixed
// 1 input forms A OR B; the AND is inverted and a third majority gate with a
// fixed 0 input ANDs NAND(A,B) with OR(A,B):
//   y = M( ~M(a,b,0), M(a,b,1), 0 ) = a ^ b
// Interface: inputs a, b; output y. Combinational. In the QCA layout this
// gate spans two clock zones (two majority-gate levels).
// The structure follows the source design's gate-level schematic.
module xor2_maj (
  input  logic a,
  input  logic b,
  output logic y
);
  logic and_ab, or_ab;

  maj3 u_and (.x(a), .y(b), .z(1'b0), .m(and_ab));
  maj3 u_or  (.x(a), .y(b), .z(1'b1), .m(or_ab));
  maj3 u_out (.x(~and_ab), .y(or_ab), .z(1'b0), .m(y));
endmodule
