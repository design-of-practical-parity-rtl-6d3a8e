// parity_generator_n: N-input parity generator built as a chain of 3-input
// XOR stages, so the area and the latency grow linearly with N.
// Stage 0 takes d[0], d[1], d[2]; every stage k takes the running parity
// on its c input (d[0] for stage 0) and folds in two new bits d[2k+1] and
// d[2k+2]. For odd N
// the chain has (N-1)/2 stages and ends exactly on the last bit; for even N a
// final 2-input XOR adds the last bit. With N = 15 the chain is seven 3-input
// XOR tiles, the extended generator of the source design.
//   ODD = 0: p = ^d (even parity bit)   ODD = 1: p = ~^d (odd parity bit)
// For the odd generator the last 3-input stage is the 3-input XNOR gate; when
// N = 2 there is no such stage and the second bit is inverted instead.
// Interface: d[N-1:0] (d[0] is the first input A1), parity output p.
// Combinational; parity_qca_pkg::gen_zones(N) gives the QCA latency in clock
// zones (21 for N = 15).
// The chained 3-input XOR structure follows the source design; the stage
// order, the even-N ending and the odd variant are this model's choices.
module parity_generator_n #(
  parameter int unsigned N   = 15,
  parameter bit          ODD = 1'b0
) (
  input  logic [N-1:0] d,
  output logic         p
);
  localparam int unsigned S3 = (N - 1) / 2;   // number of 3-input XOR stages

  // run[0] = d[0]; run[k] is the parity of d[0] .. d[2k].
  logic [S3:0] run;

  if (N < 2) begin : g_bad_n
    $error("parity_generator_n: N must be at least 2");
  end

  assign run[0] = d[0];

  for (genvar k = 0; k < S3; k++) begin : g_stage
    if (ODD && k == S3 - 1) begin : g_xnor
      xnor3_maj u_x (.a(d[2*k+1]), .b(d[2*k+2]), .c(run[k]), .y(run[k+1]));
    end else begin : g_xor
      xor3_maj  u_x (.a(d[2*k+1]), .b(d[2*k+2]), .c(run[k]), .y(run[k+1]));
    end
  end

  if (N % 2 == 0) begin : g_tail
    logic last;
    assign last = (ODD && S3 == 0) ? ~d[N-1] : d[N-1];
    xor2_maj u_tail (.a(run[S3]), .b(last), .y(p));
  end else begin : g_no_tail
    assign p = run[S3];
  end
endmodule
