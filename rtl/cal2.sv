// Two-input CAL component, foam-wrapper packaged: speculative evaluation of a
// mutually exclusive communication guard (a? | b?).
//
// A transition on `start` arms both channel C-elements at once through two
// MERGEs (MERGE 2 for channel 0, MERGE 4 for channel 1). Each C-element
// (C 3, C 5) is the rendezvous of its arm with the sender's request req[i].
// Because the guard is known to be mutually exclusive, only one request can
// come. When C 3 fires, its output also goes into MERGE 4 and moves the armed
// input of C 5 back, undoing the speculative arm of the losing channel (and
// symmetrically for C 5). The C-element outputs are the channel
// acknowledges `fire`; they leave the component through DELAY elements
// (`done`) so that the undo has settled before the next arm can arrive.
//
//   MERGE 2 = start ^ C5     C 3 = C(MERGE 2, req[0])  -> fire[0]
//   MERGE 4 = start ^ C3     C 5 = C(MERGE 4, req[1])  -> fire[1]
//
// Interface: clk, clr_n, start, req[1:0], fire[1:0], done[1:0]. Transition
// signalling throughout. Timing: fire one clock after the request meets the
// arm; done DELAY clocks after fire. The two requests must be mutually
// exclusive within one guard evaluation (checked by an assertion).
module cal2 #(
  parameter int unsigned DELAY = 2
) (
  input  logic       clk,
  input  logic       clr_n,
  input  logic       start,
  input  logic [1:0] req,
  output logic [1:0] fire,
  output logic [1:0] done
);
  logic m2, m4, c3, c5;

  assign m2 = start ^ c5;
  assign m4 = start ^ c3;

  c_element #(.N(2)) u_c3 (.clk, .clr_n, .in({m2, req[0]}), .out(c3));
  c_element #(.N(2)) u_c5 (.clk, .clr_n, .in({m4, req[1]}), .out(c5));

  assign fire = {c5, c3};

  delay_line #(.DEPTH(DELAY)) u_dly3 (.clk, .clr_n, .in(c3), .out(done[0]));
  delay_line #(.DEPTH(DELAY)) u_dly5 (.clk, .clr_n, .in(c5), .out(done[1]));

  // Speculation is only safe for a mutex guard: both arms never complete on
  // the same edge.
  a_mutex: assert property (@(posedge clk) disable iff (!clr_n)
                            !($changed(c3) && $changed(c5)))
    else $error("cal2: both guard arms fired together");
endmodule
