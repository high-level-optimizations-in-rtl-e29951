// Predicate-action block ("PAB"): a two-phase test on a data word.
//
// Each transition on `req` evaluates the predicate on `d` and answers with a
// transition on `t` (predicate true) or on `f` (false), which start the
// action that follows. ODD = 0 tests "d is zero", ODD = 1 tests "d is odd" --
// the two tests of the series-parallel multiplier. `d` must be stable from the
// request until the answer (bundled data).
//
// Interface: clk, clr_n, req, d[W-1:0], t, f. Timing: answer one clock after
// the request. The predicate encoding as a parameter is this design's choice.
module pab #(
  parameter int unsigned W   = 8,
  parameter bit          ODD = 1'b0
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic         req,
  input  logic [W-1:0] d,
  output logic         t,
  output logic         f
);
  logic seen;
  logic pred;

  assign pred = ODD ? d[0] : (d == '0);

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) begin
      seen <= 1'b0;
      t    <= 1'b0;
      f    <= 1'b0;
    end else if (req != seen) begin
      seen <= req;
      if (pred) t <= ~t;
      else      f <= ~f;
    end
  end
endmodule
