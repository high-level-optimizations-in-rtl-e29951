// Barrier synchronisation for a channel used passively by several processes
// (no data).
//
// Each of the N sequential processes is a tail-recursive loop: a MERGE (XOR)
// of `start` and the process's loop-back signal body_done[i] produces its
// readiness transition. A completion tree (an N-input C-element, "ctree3" for
// N = 3) waits for every process and produces `go`, which is both the
// acknowledge seen by the active sender and the initiate of the code each
// receiver runs after the barrier. Processes therefore stay aligned in time:
// none starts iteration k+1 before all have finished iteration k.
// Tying every body_done[i] to `go` gives the circuit for processes whose loop
// body is the barrier alone.
//
// Interface: clk, clr_n, start (transition), body_done[N-1:0] (transitions),
// go (transition). Timing: go one clock after the last process is ready.
module barrier_sync #(
  parameter int unsigned N = 3
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic         start,
  input  logic [N-1:0] body_done,
  output logic         go
);
  logic [N-1:0] ready;

  assign ready = {N{start}} ^ body_done;   // one MERGE per process

  c_element #(.N(N)) u_ctree (.clk, .clr_n, .in(ready), .out(go));
endmodule
