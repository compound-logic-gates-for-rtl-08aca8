// tb_cla_adder4: self-checking testbench for the pipelined 4-bit carry
// lookahead adder cla_adder4.
//
// 1. Latency: after idle cycles one addition 15 + 1 is applied for a single
//    cycle; the sum 16 must appear exactly four clocks later and not earlier.
// 2. Throughput: all 256 operand pairs are applied back to back, one per
//    cycle; each sum is compared, four clocks later, with the integer sum.
// 3. The same with 500 random pairs.
// A watchdog ends the run.
module tb_cla_adder4;
  import sfq_pkg::*;
  localparam int LAT = 4;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [3:0] a = '0, b = '0;
  logic [4:0] s;
  int   checks = 0, failures = 0;

  cla_adder4 dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .s(s));

  always #5 clk = ~clk;

  // expected sums, indexed by the clock edge at which they must show
  logic [4:0] exp_q [$];

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (s !== '0) begin failures++; $display("FAIL reset s=%0d", s); end
    @(negedge clk) rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // 1. latency of one isolated addition
    a = 4'd15; b = 4'd1;
    @(negedge clk);
    a = '0; b = '0;
    cyc = 1;
    while (s == 5'd0 && cyc < 20) begin
      @(negedge clk);
      cyc++;
    end
    // cyc counts the clock edges from the one that sampled a, b to the one
    // that released the sum
    checks++;
    if (s != 5'd16 || cyc != LAT) begin
      failures++;
      $display("FAIL latency: sum %0d after %0d cycles, expected 16 after %0d", s, cyc, LAT);
    end
    repeat (LAT + 1) @(negedge clk);

    // 2./3. back-to-back operands
    for (int n = 0; n < 256 + 500 + LAT; n++) begin
      if (n < 256)            {a, b} = 8'(n);
      else if (n < 256 + 500) {a, b} = 8'($urandom);
      else                    {a, b} = '0;
      exp_q.push_back(5'(a) + 5'(b));
      @(posedge clk); #1;
      if (exp_q.size() >= LAT) begin
        logic [4:0] e;
        e = exp_q.pop_front();
        checks++;
        if (s !== e) begin
          failures++;
          $display("FAIL stream n=%0d: got %0d expected %0d", n, s, e);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
