// parity_checker_n: N-bit parity checker for an (N-1)-bit data word d
// received with its parity bit pin. The (N-1)-input generator chain
// (parity_generator_n) recomputes the parity of the data and a final 2-input
// XOR compares it with pin; err = 1 flags a parity error.
//   ODD = 0: err = ^d ^ pin        ODD = 1: err = ~(^d ^ pin)
// With N = 16 this is the extended checker of the source design: seven
// 3-input XOR tiles over A1 .. A15 followed by the XOR2 tile with D.
// Interface: d[N-2:0] (d[0] is A1), pin, err. Combinational;
// parity_qca_pkg::chk_zones(N) gives the QCA latency in clock zones (23 for
// N = 16).
// The generator-plus-XOR2 structure follows the source design; the even/odd
// parameter is this model's way of covering both checker variants.
module parity_checker_n #(
  parameter int unsigned N   = 16,
  parameter bit          ODD = 1'b0
) (
  input  logic [N-2:0] d,
  input  logic         pin,
  output logic         err
);
  logic data_par;

  parity_generator_n #(.N(N - 1), .ODD(ODD)) u_gen (.d(d), .p(data_par));
  xor2_maj u_cmp (.a(data_par), .b(pin), .y(err));
endmodule
