// sfq_xor: clocked RSFQ exclusive-or gate.
//
// Its main storage loop is set by the first input pulse of a cycle and reset
// by a second one, and the clock reads and clears it. With at most one pulse
// per input and cycle, q in cycle t+1 = a ^ b in cycle t. Because every pulse
// toggles the loop, an input driven by a confluence buffer that can emit two
// pulses in one cycle gives a wrong result; sfq_cb checks for that case.
//
// Interface: clk, rst_n (active-low, asynchronous), a, b, q.
// Timing: latency one cycle, a new value every cycle.
// The function follows the document; the reset input is this design's choice.
module sfq_xor (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= a ^ b;
  end

endmodule
