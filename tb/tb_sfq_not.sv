// tb_sfq_not: self-checking testbench for the clocked inverter sfq_not.
//
// Checks that q is 0 in reset, then drives 300 random bits, one per cycle,
// and checks that the complement of each appears at q exactly one clock
// later and not before. A watchdog ends the run.
module tb_sfq_not;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic d = 1'b1;
  logic q;
  int   checks = 0, failures = 0;

  sfq_not dut (.clk(clk), .rst_n(rst_n), .a(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    repeat (3) @(posedge clk);
    #1 check(q, 1'b0, "reset");
    @(negedge clk) rst_n = 1'b1;
    d = 1'b0;
    @(posedge clk); #1;
    prev = 1'b1;   // d was 0 in the first cycle out of reset
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      d = (i < 4) ? 1'(i) : 1'($urandom_range(1));
      #1 check(q, prev, "held until clock");
      @(posedge clk); #1;
      check(q, !d, "complement at clock");
      prev = !d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
