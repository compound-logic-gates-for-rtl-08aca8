// sfq_not: clocked RSFQ inverter.
//
// The main loop starts in the state in which the clock pulse is released to
// the output. An input pulse during the cycle reverses the loop current, so
// the following clock pulse is absorbed instead and the loop is restored. At
// the cycle level: q in cycle t+1 is the complement of a in cycle t.
//
// Interface: clk, rst_n (active-low, asynchronous), a, q.
// Timing: latency one cycle, a new value every cycle.
// The behaviour follows the document; holding q at 0 during reset (no clock
// pulse has been read yet) is this design's choice.
module sfq_not (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= ~a;
  end

endmodule
