// sfq_xnor: single-cycle compound XNOR gate.
//
// Built on the identity  ~(a ^ b) = ~(a | b) | (a & b): a confluence buffer
// forms a | b, which drives an inverting loop; the storage loops of an AND
// hold a and b; a final merger joins the inverter's and the AND's outputs.
// All loops are read by the same clock pulse, so q in cycle t+1 is
// a xnor b in cycle t. The inverter and the AND can never both release a
// pulse, so the final merger never emits two.
//
// Interface: clk, rst_n (active-low, asynchronous), a, b, q.
// Timing: latency one cycle, a new value every cycle.
// The identity and the single cycle follow the document; the reset input is
// this design's choice.
module sfq_xnor (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic q
);

  logic a_or_b;   // merger of the two inputs
  logic nor_ab;   // inverting branch
  logic and_ab;   // AND branch
  logic merged;   // final merger

  assign a_or_b = a | b;
  assign nor_ab = ~a_or_b;
  assign and_ab = a & b;
  assign merged = nor_ab | and_ab;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= merged;
  end

endmodule
