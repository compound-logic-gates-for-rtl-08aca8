// sfq_pkg: constants and types shared by the compound-gate adder.
//
// The RSFQ circuits are modelled at the clock-cycle level: a logic 1 on a net
// during a cycle stands for one SFQ pulse arriving in that cycle, a 0 for no
// pulse. Every clocked (asynchronous-input, synchronous-output) gate becomes
// one register stage; splitters and confluence buffers, which need no clock,
// become fanout and combinational OR.
//
// The 4-bit width and the four-cycle latency of the adder are the document's
// numbers. The generate/propagate pair type is this design's own choice.
package sfq_pkg;

  // Operand width of the carry lookahead adder.
  localparam int unsigned CLA_BITS = 4;

  // Clock cycles from operands to sum: initial processing, two GP levels,
  // sum stage.
  localparam int unsigned CLA_LATENCY = 4;

  // Generate / propagate signal pair carried between the adder's blocks.
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

endpackage
