// cla_gp: generate-propagate (GP) block of the compound-gate carry lookahead
// adder.
//
// Combines the pair (g_i, p_i) of a more significant group with the pair
// (g_j, p_j) of the adjacent less significant group:
//     G = (g_i + p_i)(g_i + g_j)      = g_i + p_i g_j
//     P = p_i p_j
// Two confluence buffers form g_i + g_j and g_i + p_i without a clock, and a
// clocked AND joins them, so G takes one cycle instead of the two an AND-OR
// realization needs. P is a second clocked AND. g_i and p_i are never 1
// together (a bit cannot both generate and propagate), which the buffer on
// that pair asserts.
//
// Parameter HAS_P: 1 builds the P output; 0 removes its AND gate, for the
// blocks whose P is unused. P then reads 0 and p_j is ignored (a linter
// reports that input field as unused; that is intended).
// Interface: clk, rst_n (active-low, asynchronous), gp_i, gp_j, g_out, p_out.
// Timing: latency one cycle, new inputs every cycle.
// The equations, the buffer/AND structure and the P-less variant follow the
// document; the exclusivity assertion is this design's addition.
module cla_gp
  import sfq_pkg::*;
#(
  parameter bit HAS_P = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  gp_t  gp_i,
  input  gp_t  gp_j,
  output logic g_out,
  output logic p_out
);

  logic gi_or_gj;
  logic gi_or_pi;

  sfq_cb #(.SINGLE_PULSE(1'b0)) u_cb_gg (.a(gp_j.g), .b(gp_i.g), .q(gi_or_gj));
  sfq_cb #(.SINGLE_PULSE(1'b1)) u_cb_gp (.a(gp_i.g), .b(gp_i.p), .q(gi_or_pi));

  sfq_and u_and_g (.clk(clk), .rst_n(rst_n), .a(gi_or_gj), .b(gi_or_pi), .q(g_out));

  if (HAS_P) begin : g_p
    sfq_and u_and_p (.clk(clk), .rst_n(rst_n), .a(gp_i.p), .b(gp_j.p), .q(p_out));
  end else begin : g_no_p
    // P circuitry removed: no gate drives the output.
    assign p_out = 1'b0;
  end

endmodule
