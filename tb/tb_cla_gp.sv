// tb_cla_gp: self-checking testbench for the generate-propagate block cla_gp.
//
// Drives a full GP block and a P-less one with the same inputs. The inputs
// are generated as real (g, p) pairs of two operand groups, so g and p of a
// group are never both 1. One clock later the group generate is checked
// against the carry out of adding the two groups' operands (the less
// significant group's carry flowing through the more significant one if it
// propagates) and the group propagate against the AND of the p's.
// A watchdog ends the run.
module tb_cla_gp;
  import sfq_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  gp_t  gi = '0, gj = '0;
  logic g_full, p_full, g_nop, p_nop;
  int   checks = 0, failures = 0;

  cla_gp #(.HAS_P(1'b1)) dut_full (.clk(clk), .rst_n(rst_n), .gp_i(gi), .gp_j(gj),
                                   .g_out(g_full), .p_out(p_full));
  cla_gp #(.HAS_P(1'b0)) dut_nop  (.clk(clk), .rst_n(rst_n), .gp_i(gi), .gp_j(gj),
                                   .g_out(g_nop), .p_out(p_nop));

  always #5 clk = ~clk;

  // A group's (g, p) from its generate/propagate/kill state: 0 kill, 1
  // propagate, 2 generate.
  function automatic gp_t state_gp(int st);
    gp_t r;
    r.g = (st == 2);
    r.p = (st == 1);
    return r;
  endfunction

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: i=%0d%0d j=%0d%0d got %0b expected %0b",
               what, gi.g, gi.p, gj.g, gj.p, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int si, sj;
    logic exp_g, exp_p;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      si = (n < 9) ? n / 3 : int'($urandom_range(2));
      sj = (n < 9) ? n % 3 : int'($urandom_range(2));
      gi = state_gp(si);
      gj = state_gp(sj);
      // carry out of the combined group: generated by i, or by j and passed by i
      exp_g = (si == 2) || (si == 1 && sj == 2);
      exp_p = (si == 1 && sj == 1);
      @(posedge clk); #1;
      check(g_full, exp_g, "G");
      check(p_full, exp_p, "P");
      check(g_nop,  exp_g, "G (no P)");
      check(p_nop,  1'b0,  "P removed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
