// Bundled-data register shared by two writers through a CALL element.
//
// Writer 1 (r1, d1 -> a1) and writer 2 (r2, d2 -> a2) each write the register
// with a two-phase handshake. A CALL element merges their requests onto the
// register's single request and returns the register's acknowledge to the
// writer that called. The data input is a multiplexer selected by "writer 1
// has a call outstanding" (r1 ^ a1) -- the multiplexer a shared data bus
// needs. Writers must not call at the same time.
//
// Interface: clk, clr_n, r1, d1[W-1:0], a1, r2, d2[W-1:0], a2, q[W-1:0].
// Timing: q and the acknowledge two clocks after the request (register, then
// the CALL's C-element).
module shared_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic         r1,
  input  logic [W-1:0] d1,
  output logic         a1,
  input  logic         r2,
  input  logic [W-1:0] d2,
  output logic         a2,
  output logic [W-1:0] q
);
  logic rs, as_i;

  call_element u_call (.clk, .clr_n, .r1, .a1, .r2, .a2, .rs, .as_i);

  reg_2ph #(.W(W)) u_reg (
    .clk, .clr_n,
    .req(rs),
    .d  ((r1 ^ a1) ? d1 : d2),
    .ack(as_i),
    .q
  );
endmodule
