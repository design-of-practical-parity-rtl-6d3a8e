// tb_parity_checker_n: checks the 16-bit even and odd parity checkers over
// every 15-bit data word, each received once with the correct parity bit
// and once with the wrong one, and a 5-bit checker exhaustively. A correct
// word must give err = 0 and a wrong one err = 1; both outcomes are counted
// and must occur. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_parity_checker_n;
  localparam int unsigned N = 16;
  int checks = 0, failures = 0;
  int flagged = 0, accepted = 0;

  logic [N-2:0] d;
  logic         pin, err_e, err_o;
  logic [3:0]   d5;
  logic         pin5, err5_e, err5_o;

  parity_checker_n                       dut_e  (.d(d),  .pin(pin),  .err(err_e));
  parity_checker_n #(.N(N), .ODD(1'b1))  dut_o  (.d(d),  .pin(pin),  .err(err_o));
  parity_checker_n #(.N(5))              dut5_e (.d(d5), .pin(pin5), .err(err5_e));
  parity_checker_n #(.N(5), .ODD(1'b1))  dut5_o (.d(d5), .pin(pin5), .err(err5_o));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0; pin = 1'b0; d5 = '0; pin5 = 1'b0;
    for (int v = 0; v < (1 << (N - 1)); v++) begin
      logic even_par;
      even_par = logic'($countones(v) % 2);   // even-scheme parity bit
      d = (N-1)'(v);
      for (int bad = 0; bad < 2; bad++) begin
        // even checker: correct word has pin = even_par
        pin = even_par ^ logic'(bad);
        #1;
        check(err_e, logic'(bad), $sformatf("even d=%h pin=%0b", v, pin));
        // odd checker sees the same pin: correct for it when pin = ~even_par
        check(err_o, (bad == 0), $sformatf("odd d=%h pin=%0b", v, pin));
        if (err_e) flagged++; else accepted++;
      end
    end
    for (int v = 0; v < 32; v++) begin
      {d5, pin5} = 5'(v);
      #1;
      check(err5_e, logic'($countones(v) % 2 == 1), $sformatf("N=5 even %05b", v));
      check(err5_o, logic'($countones(v) % 2 == 0), $sformatf("N=5 odd %05b", v));
    end
    check(flagged > 0 && accepted > 0, 1'b1, "both correct and corrupted words seen");
    $display("flagged=%0d accepted=%0d", flagged, accepted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
