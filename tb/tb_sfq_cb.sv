// tb_sfq_cb: self-checking testbench for the confluence buffer sfq_cb.
//
// Applies all input pairs to a buffer with both inputs free and checks the
// OR without any clock delay; applies the three pairs that are not both 1 to
// a buffer marked single-pulse (its assertion must stay quiet). Random pairs
// follow. A watchdog ends the run.
module tb_sfq_cb;
  logic a = 1'b0, b = 1'b0;
  logic q, q1;
  logic a1 = 1'b0, b1 = 1'b0;
  int   checks = 0, failures = 0;

  sfq_cb #(.SINGLE_PULSE(1'b0)) dut  (.a(a),  .b(b),  .q(q));
  sfq_cb #(.SINGLE_PULSE(1'b1)) dut1 (.a(a1), .b(b1), .q(q1));

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      {a, b} = (i < 4) ? 2'(i) : 2'($urandom_range(3));
      case ({a, b})
        2'b00:   {a1, b1} = 2'b00;
        2'b01:   {a1, b1} = 2'b01;
        default: {a1, b1} = 2'b10;
      endcase
      #1;
      check(q,  (a || b) ? 1'b1 : 1'b0, "merge");
      check(q1, (a1 == 1'b1 || b1 == 1'b1), "single-pulse merge");
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
