// sfq_nimply: single-cycle compound NIMPLY gate, q = a & ~b.
//
// The conventional realization inverts b in one cycle, delays a by a path
// balancing DFF, and ANDs the two in a second cycle. Gate compounding opens
// the AND into its input storage loops and tuned merger and drops the loops
// that only delay: the inverting loop on b and the storage loop on a are read
// by one clock pulse. The gate therefore settles in a single cycle: q in cycle
// t+1 = a & ~b in cycle t, with no path balancing stage.
//
// Interface: clk, rst_n (active-low, asynchronous), a, b, q.
// Timing: latency one cycle, a new value every cycle.
// The function and the one-cycle latency follow the document; the reset input
// is this design's choice.
module sfq_nimply (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic q
);

  logic b_inv;   // state of the inverting loop on b when the clock arrives

  assign b_inv = ~b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= a & b_inv;
  end

endmodule
