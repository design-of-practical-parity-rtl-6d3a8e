// tb_xor2_maj: exhaustive check of the majority-gate XOR2 against the
// truth table of exclusive OR, written out as constants. Ends with a
// TB_RESULT line; a watchdog stops a hung run.
module tb_xor2_maj;
  logic a, b, y;
  int   checks = 0, failures = 0;
  localparam logic [3:0] TRUTH = 4'b0110;  // index {b,a}

  xor2_maj dut (.a, .b, .y);

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {b, a} = 2'(v);
      #1;
      checks++;
      if (y !== TRUTH[v]) begin
        failures++;
        $display("FAIL a=%0b b=%0b: y=%0b expected %0b", a, b, y, TRUTH[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
