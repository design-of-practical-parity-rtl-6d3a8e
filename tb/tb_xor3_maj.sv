// tb_xor3_maj: exhaustive check of the majority-gate 3-input XOR, the 3-bit even parity generator.
// The expected output is 1 exactly when the inputs hold an odd number
// of ones; the truth table is written out as a constant and cross-checked
// by counting ones. The input order of the reference waveforms (a toggling
// fastest, then c, then b) is replayed as well. Ends with a TB_RESULT line;
// a watchdog stops a hung run.
module tb_xor3_maj;
  logic a, b, c, y;
  int   checks = 0, failures = 0;
  localparam logic [7:0] TRUTH  = 8'b1001_0110;  // index {c,b,a}
  localparam logic       INVERT = 1'b0;
  // {c,b,a} in the order of the reference waveforms
  localparam logic [2:0] ORDER [8] = '{3'b000, 3'b001, 3'b100, 3'b101,
                                       3'b010, 3'b011, 3'b110, 3'b111};

  xor3_maj dut (.a, .b, .c, .y);

  task automatic apply(input logic [2:0] cba);
    logic by_count;
    {c, b, a} = cba;
    #1;
    by_count = logic'($countones(cba) % 2) ^ INVERT;
    checks++;
    if (y !== TRUTH[cba] || by_count !== TRUTH[cba]) begin
      failures++;
      $display("FAIL a=%0b b=%0b c=%0b: y=%0b expected %0b", a, b, c, y, TRUTH[cba]);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) apply(3'(v));
    foreach (ORDER[i]) apply(ORDER[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
