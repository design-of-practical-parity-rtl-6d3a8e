// parity_qca_top: the QCA parity circuits side by side.
//   * 3-bit even and odd parity generators (xor3_maj, xnor3_maj) on g3_d
//   * 4-bit even and odd parity checkers (parity_checker4) on c4_d, c4_pin
//   * GEN_N-input even and odd generators (parity_generator_n) on gn_d
//   * CHK_N-bit even and odd checkers (parity_checker_n) on cn_d, cn_pin
// Every circuit drives two outputs: the combinational logic value and a
// *_q copy delayed by that circuit's QCA latency in clock zones
// (qca_zone_delay): 3 zones for the 3-bit generators, 5 for the 4-bit
// checkers, and parity_qca_pkg::gen_zones / chk_zones for the extended
// ones (21 and 23 zones at the default sizes).
// Interface: clk is the clock-zone tick (four per QCA clock cycle), rst_n a
// synchronous active-low reset of the zone model only. Inputs held stable
// for a full zone latency show their result on the *_q outputs after that
// many clk edges; inputs may change every clock cycle (four ticks), as in a
// QCA pipeline.
// The circuits, their sizes (15-input generator, 16-bit checker) and the
// 3- and 5-zone latencies are the source design's; the latency of the
// extended circuits and the tick-based zone model are this model's own.
module parity_qca_top
  import parity_qca_pkg::*;
#(
  parameter int unsigned GEN_N = 15,
  parameter int unsigned CHK_N = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // 3-bit parity generators
  input  logic [2:0]       g3_d,
  output logic             g3_even_p,
  output logic             g3_odd_p,
  output logic             g3_even_p_q,
  output logic             g3_odd_p_q,
  // 4-bit parity checkers
  input  logic [2:0]       c4_d,
  input  logic             c4_pin,
  output logic             c4_even_err,
  output logic             c4_odd_err,
  output logic             c4_even_err_q,
  output logic             c4_odd_err_q,
  // GEN_N-input parity generators
  input  logic [GEN_N-1:0] gn_d,
  output logic             gn_even_p,
  output logic             gn_odd_p,
  output logic             gn_even_p_q,
  output logic             gn_odd_p_q,
  // CHK_N-bit parity checkers
  input  logic [CHK_N-2:0] cn_d,
  input  logic             cn_pin,
  output logic             cn_even_err,
  output logic             cn_odd_err,
  output logic             cn_even_err_q,
  output logic             cn_odd_err_q
);
  localparam int unsigned G3_ZONES = gen_zones(3);
  localparam int unsigned C4_ZONES = chk_zones(4);
  localparam int unsigned GN_ZONES = gen_zones(GEN_N);
  localparam int unsigned CN_ZONES = chk_zones(CHK_N);

  // 3-bit generators: A = g3_d[0], B = g3_d[1], C = g3_d[2]
  xor3_maj  u_g3_even (.a(g3_d[0]), .b(g3_d[1]), .c(g3_d[2]), .y(g3_even_p));
  xnor3_maj u_g3_odd  (.a(g3_d[0]), .b(g3_d[1]), .c(g3_d[2]), .y(g3_odd_p));

  // 4-bit checkers
  parity_checker4 #(.ODD(1'b0)) u_c4_even (
    .a(c4_d[0]), .b(c4_d[1]), .c(c4_d[2]), .pin(c4_pin), .err(c4_even_err));
  parity_checker4 #(.ODD(1'b1)) u_c4_odd (
    .a(c4_d[0]), .b(c4_d[1]), .c(c4_d[2]), .pin(c4_pin), .err(c4_odd_err));

  // Extended generators and checkers
  parity_generator_n #(.N(GEN_N), .ODD(1'b0)) u_gn_even (.d(gn_d), .p(gn_even_p));
  parity_generator_n #(.N(GEN_N), .ODD(1'b1)) u_gn_odd  (.d(gn_d), .p(gn_odd_p));
  parity_checker_n #(.N(CHK_N), .ODD(1'b0)) u_cn_even (.d(cn_d), .pin(cn_pin), .err(cn_even_err));
  parity_checker_n #(.N(CHK_N), .ODD(1'b1)) u_cn_odd  (.d(cn_d), .pin(cn_pin), .err(cn_odd_err));

  // Clock-zone latency of each circuit
  qca_zone_delay #(.ZONES(G3_ZONES)) u_g3_even_z (.clk, .rst_n, .in(g3_even_p),   .out(g3_even_p_q));
  qca_zone_delay #(.ZONES(G3_ZONES)) u_g3_odd_z  (.clk, .rst_n, .in(g3_odd_p),    .out(g3_odd_p_q));
  qca_zone_delay #(.ZONES(C4_ZONES)) u_c4_even_z (.clk, .rst_n, .in(c4_even_err), .out(c4_even_err_q));
  qca_zone_delay #(.ZONES(C4_ZONES)) u_c4_odd_z  (.clk, .rst_n, .in(c4_odd_err),  .out(c4_odd_err_q));
  qca_zone_delay #(.ZONES(GN_ZONES)) u_gn_even_z (.clk, .rst_n, .in(gn_even_p),   .out(gn_even_p_q));
  qca_zone_delay #(.ZONES(GN_ZONES)) u_gn_odd_z  (.clk, .rst_n, .in(gn_odd_p),    .out(gn_odd_p_q));
  qca_zone_delay #(.ZONES(CN_ZONES)) u_cn_even_z (.clk, .rst_n, .in(cn_even_err), .out(cn_even_err_q));
  qca_zone_delay #(.ZONES(CN_ZONES)) u_cn_odd_z  (.clk, .rst_n, .in(cn_odd_err),  .out(cn_odd_err_q));
endmodule
