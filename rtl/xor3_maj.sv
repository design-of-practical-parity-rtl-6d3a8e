// xor3_maj: three-input XOR made of three majority gates and two inverters.
// It is also the complete 3-bit even parity generator.
//   upper = M(a, b, ~c)      lower = M(a, b, c)
//   y     = M(upper, c, ~lower) = a ^ b ^ c
// When c = 0 the output gate reduces to upper AND ~lower = OR(a,b) AND
// NAND(a,b); when c = 1 it reduces to upper OR ~lower = AND(a,b) OR
// NOR(a,b), the XNOR of a and b.
// Interface: inputs a, b, c; output y. Combinational. In the QCA layout the
// 3-bit generator takes three clock zones (0.75 clock cycle).
// The gate structure follows the source design's gate-level schematic.
module xor3_maj (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  logic upper, lower;

  maj3 u_upper (.x(a),     .y(b), .z(~c),     .m(upper));
  maj3 u_lower (.x(a),     .y(b), .z(c),      .m(lower));
  maj3 u_out   (.x(upper), .y(c), .z(~lower), .m(y));
endmodule
