// sfq_gate2: any two-input Boolean function as a single-cycle compound gate.
//
// Gate compounding makes each of the 16 two-input truth tables available
// within one clock cycle. This module stands for that whole set: parameter TT
// is the truth table, bit {a,b} of TT being the output for inputs a and b
// (TT = 4'b1000 is AND, 4'b0110 XOR, 4'b0100 NIMPLY a&~b, 4'b1001 XNOR).
// q in cycle t+1 = TT[{a,b}] of cycle t.
//
// Interface: clk, rst_n (active-low, asynchronous), a, b, q.
// Timing: latency one cycle, a new value every cycle.
// The claim that every table fits in one cycle is the document's; the
// parameterised form and the bit order of TT are this design's choices, and
// the per-function circuits and their margins are not modelled.
module sfq_gate2 #(
  parameter logic [3:0] TT = 4'b0110
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= TT[{a, b}];
  end

endmodule
