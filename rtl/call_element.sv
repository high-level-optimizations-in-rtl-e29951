// Two-phase TRANSITION CALL element: lets two clients share one server.
//
// A request transition on r1 (or r2) is merged onto the server request rs.
// When the server acknowledges with a transition on as_i, the acknowledge is
// routed back to the client that called: a1 for r1, a2 for r2.
//
// Structure (five parts, numbered as in the classic circuit):
//   MERGE 1 : rs = r1 ^ r2
//   MERGE 2 : r1 ^ as_i  -> one input of C 5
//   MERGE 3 : r2 ^ as_i  -> one input of C 4
//   C 4     : C(r1, MERGE 3) -> a1
//   C 5     : C(MERGE 2, r2) -> a2
// After r1 only C 4 has one input moved; the acknowledge then completes C 4
// and moves MERGE 2 back, so C 5 sees no net change. A feature used by the
// shared guard circuit: applying r1 twice without an acknowledge (r1;r1)
// produces rs;rs and leaves the element in its original state, which is how a
// speculatively armed channel is disarmed.
//
// Interface: clk, clr_n, r1, a1, r2, a2, rs, as_i. Latency: a1/a2 one clock
// after as_i (the C-element register). Clients must not call concurrently.
module call_element (
  input  logic clk,
  input  logic clr_n,
  input  logic r1,
  output logic a1,
  input  logic r2,
  output logic a2,
  output logic rs,
  input  logic as_i
);
  logic m2, m3;

  assign rs = r1 ^ r2;        // MERGE 1
  assign m2 = r1 ^ as_i;      // MERGE 2
  assign m3 = r2 ^ as_i;      // MERGE 3

  c_element #(.N(2)) u_c4 (.clk, .clr_n, .in({r1, m3}), .out(a1));
  c_element #(.N(2)) u_c5 (.clk, .clr_n, .in({m2, r2}), .out(a2));
endmodule
