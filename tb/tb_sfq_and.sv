// tb_sfq_and: self-checking testbench for sfq_and (AND).
//
// Resets the gate, checks that the output stays 0 in reset, then applies all
// four input combinations followed by 300 random ones, one per cycle, and
// compares the output one clock later with the expected AND, worked out here
// from the truth table. It also checks that the result is not visible before
// that clock, i.e. the latency is exactly one cycle. A watchdog ends the run.
module tb_sfq_and;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic a = 1'b0, b = 1'b0;
  logic q;
  int   checks = 0, failures = 0;

  sfq_and dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .q(q));

  always #5 clk = ~clk;

  function automatic logic expect_q(logic x, logic y);
    return x & y;
  endfunction

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b got %0b expected %0b", what, a, b, got, exp);
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
    a = 1'b1; b = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(q, 1'b0, "reset");
    @(negedge clk) rst_n = 1'b1;
    @(posedge clk); #1;
    prev = q;
    for (int i = 0; i < 304; i++) begin
      @(negedge clk);
      if (i < 4) {a, b} = 2'(i);
      else       {a, b} = 2'($urandom_range(3));
      #1 check(q, prev, "latency");          // no change before the clock
      @(posedge clk); #1;
      check(q, expect_q(a, b), "function");
      prev = q;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
