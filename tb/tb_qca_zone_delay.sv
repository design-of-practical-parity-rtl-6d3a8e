// tb_qca_zone_delay: drives random bits into zone-delay lines of 3, 5 and 1
// zones and into a pass-through (0 zones), one bit per zone tick, and
// compares each output with a copy of the input history kept by the
// testbench. Also checks that reset clears every zone. Ends with a
// TB_RESULT line; a cycle-count watchdog stops a hung run.
module tb_qca_zone_delay;
  logic clk = 1'b0, rst_n = 1'b0, in = 1'b0;
  logic out3, out5, out1, out0;
  int   checks = 0, failures = 0, cycles = 0;
  logic [63:0] hist = '0;   // hist[k] = input sampled k+1 edges ago

  qca_zone_delay                dut3 (.clk, .rst_n, .in, .out(out3));
  qca_zone_delay #(.ZONES(5))   dut5 (.clk, .rst_n, .in, .out(out5));
  qca_zone_delay #(.ZONES(1))   dut1 (.clk, .rst_n, .in, .out(out1));
  qca_zone_delay #(.ZONES(0))   dut0 (.clk, .rst_n, .in, .out(out0));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %0b expected %0b", what, cycles, got, exp);
    end
  endtask

  always @(posedge clk) begin
    cycles++;
    if (cycles > 2000) begin
      failures++;
      $display("FAIL watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    check(out3, 1'b0, "reset zone 3");
    check(out5, 1'b0, "reset zone 5");
    check(out1, 1'b0, "reset zone 1");
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      in = logic'($urandom_range(0, 1));
      #1;
      check(out0, in, "0 zones");
      @(posedge clk);
      hist = {hist[62:0], in};
      #1;
      check(out1, hist[0], "1 zone");
      check(out3, hist[2], "3 zones");
      check(out5, hist[4], "5 zones");
    end
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    check(out5, 1'b0, "reset clears 5 zones");
    check(out3, 1'b0, "reset clears 3 zones");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
