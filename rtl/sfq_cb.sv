// sfq_cb: confluence buffer (merger), the asynchronous OR of RSFQ logic.
//
// A pulse on either input switches the output junction and releases one
// pulse; no clock is involved, so at the cycle level q = a | b within the same
// cycle. When both inputs carry a pulse in one cycle, the buffer emits one
// pulse if they coincide and two if they are apart in time. Clocked AND, DFF
// and inverter gates ignore the second pulse, but an XOR gate does not: a
// buffer that feeds an XOR must never see both inputs at 1 in a cycle.
//
// Parameter SINGLE_PULSE = 1 marks a buffer for which that rule must hold and
// turns on an assertion checking it; with 0 (default) both inputs may be 1.
// Interface: a, b, q. Timing: combinational, no clock.
// The OR function and the XOR rule follow the document; the assertion is this
// design's way of making the rule checkable.
module sfq_cb #(
  parameter bit SINGLE_PULSE = 1'b0
) (
  input  logic a,
  input  logic b,
  output logic q
);

  assign q = a | b;

  always_comb begin
    if (SINGLE_PULSE) begin
      assert final (!(a && b))
        else $error("sfq_cb: both inputs pulse in one cycle, a double pulse may reach an XOR");
    end
  end

endmodule
