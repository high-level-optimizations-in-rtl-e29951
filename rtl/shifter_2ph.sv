// Two-phase left/right shifter ("L/R shifter").
//
// A transition on `lsh` stores ain << 1 in `aout`, a transition on `rsh`
// stores ain >> 1; either way `ack` answers with a transition. The two
// requests must not be pending together. `ain` is bundled with the request.
//
// Interface: clk, clr_n, ain[W-1:0], lsh, rsh, aout[W-1:0], ack.
// Timing: aout and ack one clock after the request.
module shifter_2ph #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic [W-1:0] ain,
  input  logic         lsh,
  input  logic         rsh,
  output logic [W-1:0] aout,
  output logic         ack
);
  logic l_seen, r_seen;

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) begin
      l_seen <= 1'b0;
      r_seen <= 1'b0;
      aout   <= '0;
      ack    <= 1'b0;
    end else if (lsh != l_seen) begin
      l_seen <= lsh;
      aout   <= ain << 1;
      ack    <= ~ack;
    end else if (rsh != r_seen) begin
      r_seen <= rsh;
      aout   <= ain >> 1;
      ack    <= ~ack;
    end
  end
endmodule
