// sfq_dff: destructive-readout (DRO) D flip-flop of the RSFQ cell library.
//
// A pulse at d during a clock cycle switches the storage loop to state 1; the
// next clock pulse reads the loop, releases a pulse at q if it held 1, and
// returns it to state 0. At the cycle level this is one register: q shows in
// cycle t+1 what d held in cycle t. Used for path balancing.
//
// Interface: clk (clock pulse), rst_n (active-low, asynchronous), d, q.
// Timing: latency one cycle, a new value every cycle.
// The document gives the storage-loop behaviour and the initial state 0; the
// reset input is this design's choice, standing for that power-up state.
module sfq_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

endmodule
