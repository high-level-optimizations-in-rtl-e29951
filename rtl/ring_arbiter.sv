// Ring-style arbiter ("ring2") for general, not mutually exclusive,
// communication guards.
//
// N Q-select stages form a ring. A transition on `enb` injects a token into
// stage 0 through a MERGE (XOR) that also closes the ring. Each stage looks at
// the level g[i] ("request i is pending"): if it is high the token leaves as a
// transition on grant t[i] and the ring is quiet until the next `enb`;
// otherwise the token moves on to the next stage, and from the last stage back
// round to stage 0. Exactly one grant is produced per injected token, even when
// several requests are pending; stage 0 is asked first.
//
// Interface: clk, clr_n, enb (token transition), g[N-1:0] (levels),
// t[N-1:0] (grant transitions). Timing: one clock per stage visited.
module ring_arbiter #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic         enb,
  input  logic [N-1:0] g,
  output logic [N-1:0] t
);
  logic [N-1:0] tok_in;
  logic [N-1:0] pass;   // out_f of each stage: token moves on

  assign tok_in[0] = enb ^ pass[N-1];   // MERGE of Start and the ring feedback

  for (genvar i = 0; i < N; i++) begin : g_stage
    if (i > 0) begin : g_link
      assign tok_in[i] = pass[i-1];
    end
    q_select u_sel (
      .clk, .clr_n,
      .tok_in(tok_in[i]),
      .sel   (g[i]),
      .out_t (t[i]),
      .out_f (pass[i])
    );
  end
endmodule
