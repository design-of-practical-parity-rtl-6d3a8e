// xnor3_maj: 3-bit odd parity generator, the XNOR of three inputs, from
// three majority gates. The odd parity bit is 1 when the data hold an even
// number of ones, so that data plus parity always hold an odd number.
//   upper = M(a, b, c)       lower = M(a, b, ~c)
//   y     = M(upper, ~c, ~lower) = ~(a ^ b ^ c)
// This is the dual of xor3_maj (every input of the output gate inverted),
// which works because the majority function is self-dual.
// Interface: inputs a, b, c; output y. Combinational; three clock zones in
// the QCA layout.
// The three-majority-gate form follows the source design; the placement of
// the complements is this model's reading of it, checked exhaustively.
module xnor3_maj (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  logic upper, lower;

  maj3 u_upper (.x(a),     .y(b),  .z(c),      .m(upper));
  maj3 u_lower (.x(a),     .y(b),  .z(~c),     .m(lower));
  maj3 u_out   (.x(upper), .y(~c), .z(~lower), .m(y));
endmodule
