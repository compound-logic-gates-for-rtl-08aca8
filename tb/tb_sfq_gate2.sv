// tb_sfq_gate2: self-checking testbench for the generic single-cycle gate.
//
// Instantiates sfq_gate2 with each of the 16 truth tables and drives all of
// them with the same inputs: the four combinations, then random pairs. One
// clock later each output is compared with the Boolean function written out
// by hand for that table (constant, NOR, ..., AND, ..., OR, constant 1).
// A watchdog ends the run.
module tb_sfq_gate2;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic a = 1'b1, b = 1'b1;
  logic [15:0] q;
  int   checks = 0, failures = 0;

  for (genvar k = 0; k < 16; k++) begin : g_dut
    sfq_gate2 #(.TT(4'(k))) dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .q(q[k]));
  end

  always #5 clk = ~clk;

  function automatic logic ref_fn(int k, logic x, logic y);
    case (k)
      0:  return 1'b0;
      1:  return !x && !y;     // NOR
      2:  return !x && y;      // b and not a
      3:  return !x;
      4:  return x && !y;      // NIMPLY
      5:  return !y;
      6:  return x != y;       // XOR
      7:  return !(x && y);    // NAND
      8:  return x && y;       // AND
      9:  return x == y;       // XNOR
      10: return y;
      11: return !x || y;      // implication a -> b
      12: return x;
      13: return x || !y;      // implication b -> a
      14: return x || y;       // OR
      default: return 1'b1;
    endcase
  endfunction

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (q !== 16'h0) begin failures++; $display("FAIL reset q=%h", q); end
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      {a, b} = (i < 4) ? 2'(i) : 2'($urandom_range(3));
      @(posedge clk); #1;
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (q[k] !== ref_fn(k, a, b)) begin
          failures++;
          $display("FAIL table %0d a=%0b b=%0b got %0b", k, a, b, q[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
