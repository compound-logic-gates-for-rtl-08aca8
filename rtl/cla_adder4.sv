// cla_adder4: 4-bit carry lookahead adder built from single-cycle compound
// gates, fully pipelined at one operation per clock cycle.
//
// Stage 1  four cla_init blocks: g_k = a_k b_k, p_k = a_k ^ b_k.
// Stage 2  GP(3,2) gives G32 = g3 + p3 g2 and P32 = p3 p2;
//          GP(1,0) without P gives G10 = g1 + p1 g0 (= carry c2);
//          DFFs carry (g2, p2) and g0 (= c1) along.
// Stage 3  GP((G32,P32), G10) without P gives c4;
//          GP((g2,p2), G10) without P gives c3;
//          DFFs carry c2 and c1 along.
// Stage 4  s0 = p0, s_k = p_k ^ c_k for k = 1..3, s4 = c4; the p_k reach this
//          stage through two path balancing DFFs each.
// c_k is the carry into bit k; there is no carry input.
//
// Interface: clk, rst_n (active-low, asynchronous), a, b (4-bit operands),
// s (5-bit sum). Timing: s shows a + b of cycle t in cycle t + 4
// (CLA_LATENCY); a new operand pair may be applied every cycle.
// The block topology, the GP equations and the four-cycle latency follow the
// document; the sum stage's path balancing DFFs are this design's reading of
// how the p_k and s0 are kept in step with the carries.
module cla_adder4
  import sfq_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [CLA_BITS-1:0]   a,
  input  logic [CLA_BITS-1:0]   b,
  output logic [CLA_BITS:0]     s
);

  // Register stages on every operand-to-sum path: initial processing, two GP
  // levels, sum. Elaboration stops if this disagrees with the package latency.
  localparam int unsigned STAGES = 4;
  if (STAGES != CLA_LATENCY) begin : g_latency_mismatch
    $error("cla_adder4: %0d stages but CLA_LATENCY = %0d", STAGES, CLA_LATENCY);
  end
  if (CLA_BITS != 4) begin : g_width_mismatch
    $error("cla_adder4: the topology is drawn for 4 bits, CLA_BITS = %0d", CLA_BITS);
  end

  // ---------------- stage 1: initial processing ----------------
  gp_t [CLA_BITS-1:0] gp1;

  for (genvar k = 0; k < CLA_BITS; k++) begin : g_init
    cla_init u_init (.clk(clk), .rst_n(rst_n), .a(a[k]), .b(b[k]), .gp(gp1[k]));
  end

  // ---------------- stage 2: first GP level ----------------
  gp_t  gp32;      // group (3,2)
  gp_t  gp2_d;     // (g2, p2) delayed
  logic g10;       // G of group (1,0) = c2
  logic g0_d;      // g0 delayed = c1
  logic p10_unused;
  logic [CLA_BITS-1:0] p_d1;   // p_k delayed once for the sum stage

  cla_gp #(.HAS_P(1'b1)) u_gp32 (
    .clk(clk), .rst_n(rst_n), .gp_i(gp1[3]), .gp_j(gp1[2]),
    .g_out(gp32.g), .p_out(gp32.p)
  );
  cla_gp #(.HAS_P(1'b0)) u_gp10 (
    .clk(clk), .rst_n(rst_n), .gp_i(gp1[1]), .gp_j(gp1[0]),
    .g_out(g10), .p_out(p10_unused)
  );
  sfq_dff u_dff_g2 (.clk(clk), .rst_n(rst_n), .d(gp1[2].g), .q(gp2_d.g));
  sfq_dff u_dff_g0 (.clk(clk), .rst_n(rst_n), .d(gp1[0].g), .q(g0_d));

  // p2 is delayed by the DFF pair of row 2; the other p_k get their own.
  assign gp2_d.p = p_d1[2];
  for (genvar k = 0; k < CLA_BITS; k++) begin : g_pd1
    sfq_dff u_dff (.clk(clk), .rst_n(rst_n), .d(gp1[k].p), .q(p_d1[k]));
  end

  // ---------------- stage 3: second GP level ----------------
  logic [CLA_BITS:1] c;            // c[k]: carry into bit k
  logic [CLA_BITS-1:0] p_d2;       // p_k delayed twice
  logic p4_unused, p3_unused;

  cla_gp #(.HAS_P(1'b0)) u_gp_c4 (
    .clk(clk), .rst_n(rst_n), .gp_i(gp32), .gp_j('{g: g10, p: 1'b0}),
    .g_out(c[4]), .p_out(p4_unused)
  );
  cla_gp #(.HAS_P(1'b0)) u_gp_c3 (
    .clk(clk), .rst_n(rst_n), .gp_i(gp2_d), .gp_j('{g: g10, p: 1'b0}),
    .g_out(c[3]), .p_out(p3_unused)
  );
  sfq_dff u_dff_c2 (.clk(clk), .rst_n(rst_n), .d(g10),  .q(c[2]));
  sfq_dff u_dff_c1 (.clk(clk), .rst_n(rst_n), .d(g0_d), .q(c[1]));

  for (genvar k = 0; k < CLA_BITS; k++) begin : g_pd2
    sfq_dff u_dff (.clk(clk), .rst_n(rst_n), .d(p_d1[k]), .q(p_d2[k]));
  end

  // ---------------- stage 4: sum ----------------
  sfq_dff u_dff_s0 (.clk(clk), .rst_n(rst_n), .d(p_d2[0]), .q(s[0]));
  for (genvar k = 1; k < CLA_BITS; k++) begin : g_sum
    sfq_xor u_xor (.clk(clk), .rst_n(rst_n), .a(p_d2[k]), .b(c[k]), .q(s[k]));
  end
  sfq_dff u_dff_s4 (.clk(clk), .rst_n(rst_n), .d(c[4]), .q(s[CLA_BITS]));

endmodule
