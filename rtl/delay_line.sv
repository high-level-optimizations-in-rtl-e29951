// DELAY element used for foam-wrapper packaging.
//
// A transition on `in` reappears on `out` DEPTH clocks later. In the compiled
// guard circuits it pads the outgoing wire of a C-element so that the
// element's internal feedback has settled before anything downstream reacts
// (a one-sided timing constraint that makes the packaged component delay
// insensitive again). DEPTH defaults to 2 as in the "Delay-2" elements of the
// guard circuit; the sharing version of the guard uses 8.
//
// Interface: clk, clr_n (active-low clear, all stages 0), in, out.
// Timing: out(t) = in(t - DEPTH clocks); DEPTH must be at least 1.
module delay_line #(
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic clr_n,
  input  logic in,
  output logic out
);
  logic [DEPTH:0] stages;   // stages[0] is the input itself

  assign stages[0] = in;

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) stages[DEPTH:1] <= '0;
    else        stages[DEPTH:1] <= stages[DEPTH-1:0];
  end

  assign out = stages[DEPTH];
endmodule
