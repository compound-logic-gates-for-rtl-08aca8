// sfq_compound_top: compound-gate RSFQ logic at the cycle level.
//
// Two independent parts stand side by side:
//  * the pipelined 4-bit carry lookahead adder (cla_adder4): s = a + b four
//    cycles after a and b are applied, one addition per cycle;
//  * a bank of single-cycle gates on inputs gx, gy: the compound NIMPLY
//    (gx & ~gy) and XNOR gates, the plain clocked inverter of gx, and all 16
//    two-input truth tables (tt_q[k] = truth table k applied to gx, gy).
// Every output of the bank shows in cycle t+1 the function of cycle t.
//
// Interface: clk, rst_n (active-low, asynchronous); adder a, b, s; gate bank
// gx, gy, nimply_q, xnor_q, not_q, tt_q.
// Putting the adder and the gate bank under one top is this design's choice;
// the document describes both but does not connect them.
module sfq_compound_top
  import sfq_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // adder
  input  logic [CLA_BITS-1:0] a,
  input  logic [CLA_BITS-1:0] b,
  output logic [CLA_BITS:0]   s,
  // gate bank
  input  logic                gx,
  input  logic                gy,
  output logic                nimply_q,
  output logic                xnor_q,
  output logic                not_q,
  output logic [15:0]         tt_q
);

  cla_adder4 u_adder (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .s(s));

  sfq_nimply u_nimply (.clk(clk), .rst_n(rst_n), .a(gx), .b(gy), .q(nimply_q));
  sfq_xnor   u_xnor   (.clk(clk), .rst_n(rst_n), .a(gx), .b(gy), .q(xnor_q));
  sfq_not    u_not    (.clk(clk), .rst_n(rst_n), .a(gx), .q(not_q));

  for (genvar k = 0; k < 16; k++) begin : g_tt
    sfq_gate2 #(.TT(4'(k))) u_gate (
      .clk(clk), .rst_n(rst_n), .a(gx), .b(gy), .q(tt_q[k])
    );
  end

endmodule
