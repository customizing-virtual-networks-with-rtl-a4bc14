// bus_macro: one slice-based synchronous bus macro, the fixed crossing point
// for signals between the static region and a partially-reconfigurable region.
//
// It is an 8-bit register clocked by the global clock: every net that crosses
// a region boundary passes through one of these, so the boundary is at a fixed
// flip-flop and the timing of a swapped-in router cannot depend on the static
// logic. Latency one cycle; no enable, no reset (what it carries is qualified by
// a valid bit that is itself reset on the sending side). The 8-bit width and
// the synchronous, slice-based kind follow the document; modelling the macro as
// a plain register is this design's reading of "synchronous".
module bus_macro #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) q <= d;
endmodule
