// parity_qca_pkg: constants and latency formulas shared by the parity
// circuits. In the QCA layouts every majority-gate level sits in its own
// clock zone, so a 3-input XOR stage costs three zones and a 2-input XOR
// stage two; four zones make one clock cycle. These formulas reproduce the
// latencies stated for the source design's 3-bit generators (3 zones) and
// 4-bit checkers (5 zones); their use for longer chains is this model's
// extrapolation of the stated linear growth.
package parity_qca_pkg;

  localparam int unsigned ZONES_XOR3       = 3;
  localparam int unsigned ZONES_XOR2       = 2;

  // Number of 3-input XOR stages in an n-input generator chain.
  function automatic int unsigned gen_xor3_stages(int unsigned n);
    return (n - 1) / 2;
  endfunction

  // Clock zones from the inputs to the parity bit of an n-input generator.
  function automatic int unsigned gen_zones(int unsigned n);
    return ZONES_XOR3 * gen_xor3_stages(n) + ((n % 2 == 0) ? ZONES_XOR2 : 0);
  endfunction

  // Clock zones of an n-input checker (n-1 data bits plus the parity bit).
  function automatic int unsigned chk_zones(int unsigned n);
    return gen_zones(n - 1) + ZONES_XOR2;
  endfunction

endpackage
