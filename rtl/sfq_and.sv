// sfq_and: clocked RSFQ AND gate.
//
// Internally a pair of storage loops, one per input, read by a common clock
// pulse through a merger tuned so that a pulse passes only when both loops
// hold 1. At the cycle level: q in cycle t+1 = a & b in cycle t. A second
// pulse on one input within a cycle has no effect, so it may follow a
// confluence buffer freely.
//
// Interface: clk, rst_n (active-low, asynchronous), a, b, q.
// Timing: latency one cycle, a new value every cycle.
// The function follows the document; the reset input is this design's choice.
module sfq_and (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= a & b;
  end

endmodule
