// Two-phase subtractor ("SUB"): on a `req` transition stores a - b (modulo
// 2**W) in `d` and answers with an `ack` transition one clock later. a and b
// are bundled with the request.
//
// Interface: clk, clr_n, a[W-1:0], b[W-1:0], req, d[W-1:0], ack.
module sub_2ph #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         req,
  output logic [W-1:0] d,
  output logic         ack
);
  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) begin
      d   <= '0;
      ack <= 1'b0;
    end else if (req != ack) begin
      d   <= a - b;
      ack <= req;
    end
  end
endmodule
