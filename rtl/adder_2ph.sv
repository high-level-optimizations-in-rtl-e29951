// Two-phase adder ("adder8 2ph") with a completion time of LAT clocks.
//
// A transition on `req` starts a + b; LAT clocks later `sum` holds the result
// (modulo 2**W), `cout` the carry out, and `ack` answers with a transition
// (at least 2 clocks: one to start, one to finish).
// a and b are bundled with the request and must stay stable until `ack`.
// The completion time stands for the carry-propagation time of a
// self-timed adder; its value is this design's choice.
//
// Interface: clk, clr_n, a[W-1:0], b[W-1:0], req, sum[W-1:0], cout, ack.
module adder_2ph #(
  parameter int unsigned W   = 8,
  parameter int unsigned LAT = 4
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         req,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         ack
);
  localparam int unsigned CW = $clog2(LAT + 1);
  logic          busy;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      sum  <= '0;
      cout <= 1'b0;
      ack  <= 1'b0;
    end else if (!busy) begin
      if (req != ack) begin
        busy <= 1'b1;
        cnt  <= CW'(1);
      end
    end else if (cnt >= CW'(LAT - 1)) begin
      {cout, sum} <= {1'b0, a} + {1'b0, b};
      ack         <= req;
      busy        <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
