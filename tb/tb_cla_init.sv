// tb_cla_init: self-checking testbench for the adder's initial processing
// block cla_init.
//
// Applies the four operand-bit pairs and then random pairs, one per cycle,
// and checks one clock later that g is the bitwise AND and p the XOR (g and p
// are never both 1). A watchdog ends the run.
module tb_cla_init;
  import sfq_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic a = 1'b1, b = 1'b1;
  gp_t  gp;
  int   checks = 0, failures = 0;

  cla_init dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .gp(gp));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] sum;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (gp !== '0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      {a, b} = (i < 4) ? 2'(i) : 2'($urandom_range(3));
      sum = 2'(a) + 2'(b);          // half adder: g is the carry, p the sum bit
      @(posedge clk); #1;
      checks++;
      if (gp.g !== sum[1] || gp.p !== sum[0]) begin
        failures++;
        $display("FAIL a=%0b b=%0b g=%0b p=%0b", a, b, gp.g, gp.p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
