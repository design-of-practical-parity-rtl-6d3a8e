// maj3: three-input majority gate, the logic primitive of quantum-dot
// cellular automata (QCA). The output follows whichever value at least two
// of the inputs carry. Tying one input to 0 (cell polarization -1) turns it
// into a two-input AND, tying it to 1 (polarization +1) into an OR; the XOR
// and parity circuits in this design are built only from this gate and
// inverters.
// Interface: inputs x, y, z; output m. Purely combinational, no clock.
// The gate and its -1/+1 convention follow the source design; writing it as
// a sum of products is this model's own choice.
module maj3 (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic m
);
  assign m = (x & y) | (y & z) | (x & z);
endmodule
