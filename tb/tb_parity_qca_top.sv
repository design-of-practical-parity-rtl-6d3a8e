// tb_parity_qca_top: end-to-end test of all parity circuits at their
// default sizes. Each QCA clock cycle (four zone ticks) it draws a random
// data word, lets the 3-bit and 15-input generators compute its even
// parity, "transmits" word and parity to the 4-bit and 16-bit checkers with
// either no error or one flipped bit (a random data bit or the parity bit),
// and checks that
//   * the even and odd generators give the parity of the word (reference:
//     a count of ones) and are each other's complement,
//   * the even checkers flag exactly the corrupted words and the odd
//     checkers exactly the uncorrupted ones,
//   * every *_q output repeats the combinational value exactly 3 (3-bit
//     generators), 5 (4-bit checkers), 21 (15-input generators) or 23
//     (16-bit checkers) zone ticks later.
// It counts the mechanisms seen: odd and even data words, words sent clean,
// data-bit errors, parity-bit errors, detected errors, and latency matches
// of every zone delay; one that never happened counts as a failure.
// Ends with a TB_RESULT line; a cycle-count watchdog stops a hung run.
module tb_parity_qca_top;
  import parity_qca_pkg::*;

  localparam int unsigned GEN_N  = 15;
  localparam int unsigned CHK_N  = 16;
  localparam int unsigned TICKS_PER_CYCLE = 4;
  localparam int unsigned CYCLES = 3000;
  // Latencies from the source design (3, 5 zones) and the chain formula.
  localparam int unsigned LAT_G3 = 3;
  localparam int unsigned LAT_C4 = 5;
  localparam int unsigned LAT_GN = 21;
  localparam int unsigned LAT_CN = 23;
  localparam int unsigned HIST   = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0]       g3_d = '0,  c4_d = '0;
  logic             c4_pin = 1'b0, cn_pin = 1'b0;
  logic [GEN_N-1:0] gn_d = '0;
  logic [CHK_N-2:0] cn_d = '0;
  logic g3_even_p, g3_odd_p, g3_even_p_q, g3_odd_p_q;
  logic c4_even_err, c4_odd_err, c4_even_err_q, c4_odd_err_q;
  logic gn_even_p, gn_odd_p, gn_even_p_q, gn_odd_p_q;
  logic cn_even_err, cn_odd_err, cn_even_err_q, cn_odd_err_q;

  parity_qca_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, ticks = 0;
  // mechanism counters
  int n_odd_words = 0, n_even_words = 0, n_clean = 0;
  int n_data_err = 0, n_par_err = 0, n_detect = 0;
  int n_lat_g3 = 0, n_lat_c4 = 0, n_lat_gn = 0, n_lat_cn = 0;

  // Expected combinational values of the last HIST ticks, index 0 = now.
  typedef struct packed {
    logic g3_even, g3_odd, c4_even, c4_odd, gn_even, gn_odd, cn_even, cn_odd;
  } exp_t;
  exp_t hist [HIST];
  exp_t cur;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at tick %0d: got %0b expected %0b", what, ticks, got, exp);
    end
  endtask

  function automatic logic par(input logic [31:0] v);
    return logic'($countones(v) % 2);
  endfunction

  initial begin : watchdog
    repeat (TICKS_PER_CYCLE * CYCLES + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Check the *_q outputs against the history after every tick.
  task automatic tick_and_check();
    @(posedge clk);
    ticks++;
    for (int i = HIST - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = cur;
    #1;
    // hist[k-1] is the value applied k ticks ago (sampled at the k-th edge back)
    if (ticks > LAT_CN + 1) begin
      check(g3_even_p_q,   hist[LAT_G3-1].g3_even, "g3_even_p_q latency");
      check(g3_odd_p_q,    hist[LAT_G3-1].g3_odd,  "g3_odd_p_q latency");
      check(c4_even_err_q, hist[LAT_C4-1].c4_even, "c4_even_err_q latency");
      check(c4_odd_err_q,  hist[LAT_C4-1].c4_odd,  "c4_odd_err_q latency");
      check(gn_even_p_q,   hist[LAT_GN-1].gn_even, "gn_even_p_q latency");
      check(gn_odd_p_q,    hist[LAT_GN-1].gn_odd,  "gn_odd_p_q latency");
      check(cn_even_err_q, hist[LAT_CN-1].cn_even, "cn_even_err_q latency");
      check(cn_odd_err_q,  hist[LAT_CN-1].cn_odd,  "cn_odd_err_q latency");
      // a match is only evidence of the latency when the value just changed
      if (hist[LAT_G3-1].g3_even != hist[LAT_G3].g3_even && g3_even_p_q == hist[LAT_G3-1].g3_even) n_lat_g3++;
      if (hist[LAT_C4-1].c4_even != hist[LAT_C4].c4_even && c4_even_err_q == hist[LAT_C4-1].c4_even) n_lat_c4++;
      if (hist[LAT_GN-1].gn_even != hist[LAT_GN].gn_even && gn_even_p_q == hist[LAT_GN-1].gn_even) n_lat_gn++;
      if (hist[LAT_CN-1].cn_even != hist[LAT_CN].cn_even && cn_even_err_q == hist[LAT_CN-1].cn_even) n_lat_cn++;
    end
  endtask

  initial begin
    for (int i = 0; i < HIST; i++) hist[i] = '0;
    cur = '0;
    // zone latencies used by the design must match the stated ones
    check(gen_zones(3) == LAT_G3, 1'b1, "gen_zones(3)");
    check(chk_zones(4) == LAT_C4, 1'b1, "chk_zones(4)");
    check(gen_zones(GEN_N) == LAT_GN, 1'b1, "gen_zones(15)");
    check(chk_zones(CHK_N) == LAT_CN, 1'b1, "chk_zones(16)");
    repeat (3) @(posedge clk);
    #1;
    check(gn_even_p_q, 1'b0, "reset clears zones");
    rst_n = 1'b1;

    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      logic [GEN_N-1:0] word;
      logic [2:0]       w3;
      logic             p15, p3;
      int               kind, pos;
      word = GEN_N'($urandom);
      w3   = word[2:0];
      // transmitter side
      gn_d = word;
      g3_d = w3;
      #1;
      p15 = par(32'(word));
      p3  = par(32'(w3));
      check(gn_even_p, p15,  "15-input even generator");
      check(gn_odd_p,  !p15, "15-input odd generator");
      check(g3_even_p, p3,   "3-bit even generator");
      check(g3_odd_p,  !p3,  "3-bit odd generator");
      if (p15) n_odd_words++; else n_even_words++;
      // channel: 0 = clean, 1 = flip a data bit, 2 = flip the parity bit
      kind = int'($urandom_range(0, 2));
      cn_d = word; cn_pin = gn_even_p;
      c4_d = w3;   c4_pin = g3_even_p;
      if (kind == 1) begin
        pos = int'($urandom_range(0, GEN_N - 1));
        cn_d[pos] = ~cn_d[pos];
        c4_d[pos % 3] = ~c4_d[pos % 3];
        n_data_err++;
      end else if (kind == 2) begin
        cn_pin = ~cn_pin;
        c4_pin = ~c4_pin;
        n_par_err++;
      end else begin
        n_clean++;
      end
      #1;
      check(cn_even_err, kind != 0, "16-bit even checker");
      check(cn_odd_err,  kind == 0, "16-bit odd checker");
      check(c4_even_err, kind != 0, "4-bit even checker");
      check(c4_odd_err,  kind == 0, "4-bit odd checker");
      if (kind != 0 && cn_even_err && c4_even_err) n_detect++;
      cur = '{g3_even: p3, g3_odd: !p3, c4_even: kind != 0, c4_odd: kind == 0,
              gn_even: p15, gn_odd: !p15, cn_even: kind != 0, cn_odd: kind == 0};
      repeat (TICKS_PER_CYCLE) tick_and_check();
    end

    $display("odd_words=%0d even_words=%0d clean=%0d data_err=%0d parity_err=%0d detected=%0d",
             n_odd_words, n_even_words, n_clean, n_data_err, n_par_err, n_detect);
    $display("latency evidence: g3=%0d c4=%0d gn=%0d cn=%0d", n_lat_g3, n_lat_c4, n_lat_gn, n_lat_cn);
    check(n_odd_words > 0,  1'b1, "odd-parity word seen");
    check(n_even_words > 0, 1'b1, "even-parity word seen");
    check(n_clean > 0,      1'b1, "clean transmission seen");
    check(n_data_err > 0,   1'b1, "data-bit error seen");
    check(n_par_err > 0,    1'b1, "parity-bit error seen");
    check(n_detect == n_data_err + n_par_err, 1'b1, "every error detected");
    check(n_lat_g3 > 0 && n_lat_c4 > 0 && n_lat_gn > 0 && n_lat_cn > 0, 1'b1, "every zone latency exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
