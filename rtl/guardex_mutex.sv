// Guardex without channel sharing:
//   P <= (a? -> P) | (b? -> P)
//   Q <= (c? -> a! -> Q) | (d? -> b! -> Q)
//
// Q's guard (c? | d?) is general: c and d come from the environment in any
// order, so it is built with a ring arbiter. The arbiter's request levels are
// "c pending" (c_in ^ c_out) and "d pending" (d_in ^ d_out); its grants arm the
// C-elements C 9 (c?) and C 10 (d?), whose outputs acknowledge the environment
// (c_out, d_out) and at the same time are Q's a! and b! requests.
// P's guard (a? | b?) is mutually exclusive (only one of a!, b! is sent per
// round of Q), so it is built with the speculative CAL component: both
// channels are armed, the losing arm is undone.
// Each process is a tail-recursive loop: a 3-input MERGE of start and the two
// completions re-initiates it (Q on the channel acknowledges, P on the
// foam-wrapped, delayed completions).
//
// Interface: clk, clr_n, start, c_in, d_in, c_out, d_out (the environment's
// two-phase channels c and d), a_ev, b_ev (acknowledge transitions of the
// internal channels a and b, for observation).
module guardex_mutex #(
  parameter int unsigned DELAY = 2
) (
  input  logic clk,
  input  logic clr_n,
  input  logic start,
  input  logic c_in,
  input  logic d_in,
  output logic c_out,
  output logic d_out,
  output logic a_ev,
  output logic b_ev
);
  logic       q_go, p_go;
  logic [1:0] grant, fire, done;

  // ---- Q: general guard with a ring arbiter ----
  assign q_go = start ^ a_ev ^ b_ev;

  ring_arbiter #(.N(2)) u_ring (
    .clk, .clr_n,
    .enb(q_go),
    .g  ({d_in ^ d_out, c_in ^ c_out}),
    .t  (grant)
  );

  c_element #(.N(2)) u_c9  (.clk, .clr_n, .in({grant[0], c_in}), .out(c_out));
  c_element #(.N(2)) u_c10 (.clk, .clr_n, .in({grant[1], d_in}), .out(d_out));

  // ---- P: mutex guard, speculative CAL ----
  assign p_go = start ^ done[0] ^ done[1];

  cal2 #(.DELAY(DELAY)) u_cal (
    .clk, .clr_n,
    .start(p_go),
    .req  ({d_out, c_out}),
    .fire (fire),
    .done (done)
  );

  assign a_ev = fire[0];
  assign b_ev = fire[1];
endmodule
