// tb_parity_checker4: exhaustive check of the even (ODD = 0) and odd
// (ODD = 1) 4-bit parity checkers over all 16 words {a,b,c,pin}. The even
// checker must flag every word with an odd number of ones, the odd checker
// every word with an even number. It also counts how many words each
// checker accepted and flagged and fails if either case never occurred.
// Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_parity_checker4;
  logic a, b, c, pin, err_even, err_odd;
  int   checks = 0, failures = 0;
  int   flagged = 0, accepted = 0;

  parity_checker4                dut_even (.a, .b, .c, .pin, .err(err_even));
  parity_checker4 #(.ODD(1'b1))  dut_odd  (.a, .b, .c, .pin, .err(err_odd));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
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
    for (int v = 0; v < 16; v++) begin
      int ones;
      {a, b, c, pin} = 4'(v);
      #1;
      ones = $countones(v);
      check(err_even, (ones % 2) == 1, $sformatf("even checker word %04b", v));
      check(err_odd,  (ones % 2) == 0, $sformatf("odd checker word %04b", v));
      if (err_even) flagged++; else accepted++;
    end
    check(flagged == 8 && accepted == 8, 1'b1, "even checker flagged 8 of 16 words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
