// tb_parity_generator_n: checks the chained parity generator at its default
// size (15 inputs, even) against the reduction XOR of the inputs over all
// 2^15 words, and the odd variant and other sizes (2, 3, 4, 8) over all of
// their words. Expected values come from counting ones, not from the gate
// chain. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_parity_generator_n;
  localparam int unsigned N = 15;
  int checks = 0, failures = 0;

  logic [N-1:0] d;
  logic p15, p15o;
  logic [1:0] d2; logic p2, p2o;
  logic [2:0] d3; logic p3, p3o;
  logic [3:0] d4; logic p4, p4o;
  logic [7:0] d8; logic p8, p8o;

  parity_generator_n                          dut15  (.d(d),  .p(p15));
  parity_generator_n #(.N(N), .ODD(1'b1))     dut15o (.d(d),  .p(p15o));
  parity_generator_n #(.N(2))                 dut2   (.d(d2), .p(p2));
  parity_generator_n #(.N(2), .ODD(1'b1))     dut2o  (.d(d2), .p(p2o));
  parity_generator_n #(.N(3))                 dut3   (.d(d3), .p(p3));
  parity_generator_n #(.N(3), .ODD(1'b1))     dut3o  (.d(d3), .p(p3o));
  parity_generator_n #(.N(4))                 dut4   (.d(d4), .p(p4));
  parity_generator_n #(.N(4), .ODD(1'b1))     dut4o  (.d(d4), .p(p4o));
  parity_generator_n #(.N(8))                 dut8   (.d(d8), .p(p8));
  parity_generator_n #(.N(8), .ODD(1'b1))     dut8o  (.d(d8), .p(p8o));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  function automatic logic odd_ones(input int unsigned v);
    return logic'($countones(v) % 2);
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0; d2 = '0; d3 = '0; d4 = '0; d8 = '0;
    for (int v = 0; v < (1 << N); v++) begin
      d = N'(v);
      d2 = 2'(v); d3 = 3'(v); d4 = 4'(v); d8 = 8'(v);
      #1;
      check(p15,  odd_ones(v),  $sformatf("N=15 even d=%h", v));
      check(p15o, !odd_ones(v), $sformatf("N=15 odd d=%h", v));
      if (v < 256) begin
        check(p8,  odd_ones(32'(v[7:0])),  $sformatf("N=8 even d=%h", v));
        check(p8o, !odd_ones(32'(v[7:0])), $sformatf("N=8 odd d=%h", v));
      end
      if (v < 16) begin
        check(p4,  odd_ones(32'(v[3:0])),  $sformatf("N=4 even d=%h", v));
        check(p4o, !odd_ones(32'(v[3:0])), $sformatf("N=4 odd d=%h", v));
      end
      if (v < 8) begin
        check(p3,  odd_ones(32'(v[2:0])),  $sformatf("N=3 even d=%h", v));
        check(p3o, !odd_ones(32'(v[2:0])), $sformatf("N=3 odd d=%h", v));
      end
      if (v < 4) begin
        check(p2,  odd_ones(32'(v[1:0])),  $sformatf("N=2 even d=%h", v));
        check(p2o, !odd_ones(32'(v[1:0])), $sformatf("N=2 odd d=%h", v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
