// parity_checker4: 4-bit parity checker for a 3-bit data word (a, b, c)
// received together with its parity bit pin. A 3-input gate computes the
// parity of the data and a 2-input XOR compares it with the received bit;
// err = 1 signals a parity error.
//   ODD = 0, even checker: err = a ^ b ^ c ^ pin   (3-input XOR, then XOR2)
//   ODD = 1, odd checker:  err = ~(a ^ b ^ c ^ pin) (3-input XNOR, then XOR2)
// Interface: inputs a, b, c, pin; output err. Combinational. In the QCA
// layout both checkers take five clock zones (1.25 clock cycles): three for
// the 3-input gate and two for the XOR2.
// The two-gate structure follows the source design; using the odd parity
// generator gate as the first stage of the odd checker is this model's
// choice.
module parity_checker4 #(
  parameter bit ODD = 1'b0
) (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic pin,
  output logic err
);
  logic data_par;

  if (ODD) begin : g_odd
    xnor3_maj u_gen (.a(a), .b(b), .c(c), .y(data_par));
  end else begin : g_even
    xor3_maj  u_gen (.a(a), .b(b), .c(c), .y(data_par));
  end

  xor2_maj u_cmp (.a(data_par), .b(pin), .y(err));
endmodule
