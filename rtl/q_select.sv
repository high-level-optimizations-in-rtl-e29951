// Q-select: steers an incoming token by the level of a select input.
//
// Each transition on tok_in (a token) leaves on out_t if `sel` is high when
// the token is taken, or on out_f if it is low. In a full-custom circuit this
// part contains the arbitration/metastability hazard; in this clocked
// emulation `sel` is simply sampled at the clock edge, which is where this
// design departs from a true self-timed Q-select.
//
// Interface: clk, clr_n, tok_in, sel, out_t, out_f (all transition signals
// except sel). Timing: the output transition follows one clock after tok_in.
module q_select (
  input  logic clk,
  input  logic clr_n,
  input  logic tok_in,
  input  logic sel,
  output logic out_t,
  output logic out_f
);
  logic seen;   // parity of tokens taken so far

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) begin
      seen  <= 1'b0;
      out_t <= 1'b0;
      out_f <= 1'b0;
    end else if (tok_in != seen) begin
      seen <= tok_in;
      if (sel) out_t <= ~out_t;
      else     out_f <= ~out_f;
    end
  end
endmodule
