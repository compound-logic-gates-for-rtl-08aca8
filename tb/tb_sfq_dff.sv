// tb_sfq_dff: self-checking testbench for the DRO D flip-flop sfq_dff.
//
// Checks that q is 0 in reset, then drives 300 random bits, one per cycle,
// and checks that each appears at q exactly one clock later: not before that
// clock, and replaced by the next bit after the following one (the loop is
// cleared by every read). A watchdog ends the run.
module tb_sfq_dff;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic d = 1'b1;
  logic q;
  int   checks = 0, failures = 0;

  sfq_dff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

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
    prev = 1'b0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      d = (i < 4) ? 1'(i) : 1'($urandom_range(1));
      #1 check(q, prev, "held until clock");
      @(posedge clk); #1;
      check(q, d, "released at clock");
      prev = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
