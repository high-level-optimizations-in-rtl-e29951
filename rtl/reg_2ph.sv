// Bundled-data register with a two-phase request/acknowledge ("reg8").
//
// A transition on `req` means the data on `d` is valid; the register copies
// `d` into `q` and answers with a transition on `ack` on the same clock edge.
// The data must be stable from the request transition until the acknowledge
// (bundling constraint). Width defaults to 8 bits as in the "reg8" parts.
//
// Interface: clk, clr_n (clears q and ack to 0), req, d[W-1:0], ack, q[W-1:0].
// Timing: ack and q change one clock after the req transition.
module reg_2ph #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic         req,
  input  logic [W-1:0] d,
  output logic         ack,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) begin
      ack <= 1'b0;
      q   <= '0;
    end else if (req != ack) begin
      q   <= d;
      ack <= req;
    end
  end
endmodule
