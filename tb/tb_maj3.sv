// tb_maj3: exhaustive check of the majority gate against a count of ones
// (at least two of three inputs high), plus the AND and OR behaviour with
// one input fixed at 0 or 1. Ends with a TB_RESULT line; a watchdog stops a
// hung run.
module tb_maj3;
  logic x, y, z, m;
  int   checks = 0, failures = 0;

  maj3 dut (.x, .y, .z, .m);

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
    for (int v = 0; v < 8; v++) begin
      {z, y, x} = 3'(v);
      #1;
      check(m, ($countones(v) >= 2), $sformatf("maj(%03b)", v));
      if (z == 1'b0) check(m, x & y, "and with z=0");
      else           check(m, x | y, "or with z=1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
