// Guardex with channel sharing:
//   P <= (a? -> b? -> P) | (b? -> a? -> P)
//   Q <= (c? -> a! -> Q) | (d? -> b! -> Q)
//
// P uses each channel twice: once in its guard and once after the other
// channel. Each channel keeps a single rendezvous C-element (Ca, Cb), shared
// between the two uses through a CALL element: R1 is the guard use, R2 the
// later use. The guard is still evaluated speculatively (it is mutually
// exclusive): one transition of P's loop MERGE calls R1 of both CALLs, arming
// both channels. When channel a wins, the CALL returns A1 on channel a; that
// transition (i) calls R1 of channel b's CALL a second time (R1;R1), which
// moves Cb's armed input back and leaves the CALL in its old state -- the
// undo of the losing arm -- and (ii) after a DELAY (8 clocks, long enough for
// the undo to settle) calls R2 of channel b's CALL for the b? that follows.
// The A2 acknowledges (second uses complete) re-initiate P. Q is the same as
// in the unshared circuit: ring arbiter over c and d, C 9 and C 10.
//
// Interface: clk, clr_n, start, c_in, d_in, c_out, d_out, a_ev, b_ev
// (acknowledge transitions of channels a and b), p_loop (P's loop-back
// transition). The environment must offer c and d so that each round of P
// sees one a and one b (for example c, d, c, d, ...), as the specification
// itself requires.
module guardex_shared #(
  parameter int unsigned DELAY = 8
) (
  input  logic clk,
  input  logic clr_n,
  input  logic start,
  input  logic c_in,
  input  logic d_in,
  output logic c_out,
  output logic d_out,
  output logic a_ev,
  output logic b_ev,
  output logic p_loop
);
  logic       q_go, p_go;
  logic [1:0] grant;
  logic       rs_a, rs_b;
  logic       a1_a, a2_a, a1_b, a2_b;
  logic       r2_a, r2_b;

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

  // ---- P: speculative guard over shared channels ----
  assign p_go   = start ^ a2_a ^ a2_b;
  assign p_loop = a2_a ^ a2_b;

  // Later uses: b? after the a-arm, a? after the b-arm.
  delay_line #(.DEPTH(DELAY)) u_dly_b (.clk, .clr_n, .in(a1_a), .out(r2_b));
  delay_line #(.DEPTH(DELAY)) u_dly_a (.clk, .clr_n, .in(a1_b), .out(r2_a));

  call_element u_call_a (
    .clk, .clr_n,
    .r1  (p_go ^ a1_b),     // arm with the guard; undo when b wins
    .a1  (a1_a),
    .r2  (r2_a),
    .a2  (a2_a),
    .rs  (rs_a),
    .as_i(a_ev)
  );
  call_element u_call_b (
    .clk, .clr_n,
    .r1  (p_go ^ a1_a),
    .a1  (a1_b),
    .r2  (r2_b),
    .a2  (a2_b),
    .rs  (rs_b),
    .as_i(b_ev)
  );

  // Channel rendezvous: P's (shared) request with Q's a! / b!.
  c_element #(.N(2)) u_ca (.clk, .clr_n, .in({rs_a, c_out}), .out(a_ev));
  c_element #(.N(2)) u_cb (.clk, .clr_n, .in({rs_b, d_out}), .out(b_ev));

  a_mutex: assert property (@(posedge clk) disable iff (!clr_n)
                            !($changed(a1_a) && $changed(a1_b)))
    else $error("guardex_shared: both guard arms won together");
endmodule
