// Muller C-element (and, for N > 2, a completion tree such as "ctree3").
//
// The output goes high once every input is high, goes low once every input is
// low, and otherwise keeps its value. For two inputs this is the state equation
// c' = ab + bc + ac. The C-element is the rendezvous of two-phase signalling:
// a channel used passively by exactly one process is one two-input C-element
// joining the sender's request transition with the receiver's readiness.
//
// Realization: every self-timed circuit in this library is emulated on a
// sampling clock. The state of the C-element is a flip-flop, so the output
// changes on the first clock edge after all inputs agree (one clock of
// latency). This breaks every feedback ring in the macromodule netlists at a
// register, so the circuits are synthesizable and simulate deterministically.
// That clocked emulation, the width parameter and the clear-to-zero are this
// design's choices; the logic function is the classical one.
//
// Interface: clk, clr_n (active-low asynchronous clear, output 0),
//            in[N-1:0], out.
module c_element #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic [N-1:0] in,
  output logic         out
);
  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n)        out <= 1'b0;
    else if (&in)      out <= 1'b1;
    else if (~|in)     out <= 1'b0;
  end
endmodule
