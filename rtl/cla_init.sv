// cla_init: initial processing block of the compound-gate carry lookahead
// adder, one per bit position.
//
// Splitters copy a_i and b_i to a clocked XOR, which yields the propagate
// signal p_i = a_i ^ b_i, and to a clocked AND, which yields the generate
// signal g_i = a_i & b_i. Both gates are read by the same clock pulse.
//
// Interface: clk, rst_n (active-low, asynchronous), a, b (one operand bit
// each), gp (g and p of this bit position).
// Timing: latency one cycle, a new operand pair every cycle.
// The structure follows the document; the gp_t bundle is this design's own.
module cla_init
  import sfq_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output gp_t  gp
);

  // The splitters on a and b are net fanout at this level.
  sfq_xor u_xor (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .q(gp.p));
  sfq_and u_and (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .q(gp.g));

endmodule
