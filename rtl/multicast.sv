// Multicast channel with data: one active sender P, NRECV passive receivers
// (Q and R for NRECV = 2), in the optimized form where receivers proceed as
// soon as they have latched the value.
//
// P holds x1 in a bundled register loaded through ld/ld_in/ld_ack. P's loop
// MERGE (start ^ a_ack) issues a send request on channel a with x1 on a_data.
// Receiver i is a loop as well: its readiness is start ^ rx_ack[i]. A two-input
// C-element joins P's request with that readiness and makes receiver i's
// register latch a_data; its acknowledge rx_ack[i] immediately re-arms the
// receiver (it does not wait for the others). A completion tree over all
// rx_ack gives a_ack, so P is blocked until every receiver has latched, and
// only then sends again.
//
// Interface: clk, clr_n, start, ld, ld_in, ld_ack, a_data, a_ack,
// rx_out[NRECV], rx_ack[NRECV]. All control signals are transitions.
// Timing: a send takes 3 clocks (rendezvous, latch, completion tree).
// The x1 load is not ordered against sends: load it between start-up and the
// first send, or accept that one send may carry either value.
module multicast #(
  parameter int unsigned W     = 8,
  parameter int unsigned NRECV = 2
) (
  input  logic                     clk,
  input  logic                     clr_n,
  input  logic                     start,
  input  logic                     ld,
  input  logic [W-1:0]             ld_in,
  output logic                     ld_ack,
  output logic [W-1:0]             a_data,
  output logic                     a_ack,
  output logic [NRECV-1:0][W-1:0]  rx_out,
  output logic [NRECV-1:0]         rx_ack
);
  logic             p_req;
  logic [NRECV-1:0] rdv;

  reg_2ph #(.W(W)) u_x1 (.clk, .clr_n, .req(ld), .d(ld_in), .ack(ld_ack), .q(a_data));

  assign p_req = start ^ a_ack;

  for (genvar i = 0; i < NRECV; i++) begin : g_rx
    c_element #(.N(2)) u_rdv (.clk, .clr_n, .in({p_req, start ^ rx_ack[i]}), .out(rdv[i]));
    reg_2ph #(.W(W)) u_reg (.clk, .clr_n, .req(rdv[i]), .d(a_data), .ack(rx_ack[i]), .q(rx_out[i]));
  end

  c_element #(.N(NRECV)) u_ctree (.clk, .clr_n, .in(rx_ack), .out(a_ack));
endmodule
