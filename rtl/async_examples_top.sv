// Compiled self-timed example circuits, side by side.
//
// Five independent circuits, each with its own ports (prefix in brackets):
//   guardex_shared [gs_]  Guardex with shared channels (CALL elements, delay 8)
//   guardex_mutex  [gm_]  Guardex without sharing (CAL component, delay 2)
//   barrier_sync   [bs_]  3-process barrier; loop-back through body_done
//   multicast      [mc_]  one sender, two receivers, 8-bit data
//   mult_pipe      [mp_]  pipelined 8-bit series-parallel multiplier
// They share only the emulation clock and the active-low clear. All control
// ports are two-phase transition signals; see each module for its protocol.
module async_examples_top #(
  parameter int unsigned W = 8
) (
  input  logic                 clk,
  input  logic                 clr_n,
  // Guardex with sharing
  input  logic                 gs_start,
  input  logic                 gs_c_in,
  input  logic                 gs_d_in,
  output logic                 gs_c_out,
  output logic                 gs_d_out,
  output logic                 gs_a_ev,
  output logic                 gs_b_ev,
  output logic                 gs_p_loop,
  // Guardex without sharing
  input  logic                 gm_start,
  input  logic                 gm_c_in,
  input  logic                 gm_d_in,
  output logic                 gm_c_out,
  output logic                 gm_d_out,
  output logic                 gm_a_ev,
  output logic                 gm_b_ev,
  // Barrier synchronisation
  input  logic                 bs_start,
  input  logic [2:0]           bs_body_done,
  output logic                 bs_go,
  // Multicast
  input  logic                 mc_start,
  input  logic                 mc_ld,
  input  logic [W-1:0]         mc_ld_in,
  output logic                 mc_ld_ack,
  output logic [W-1:0]         mc_a_data,
  output logic                 mc_a_ack,
  output logic [1:0][W-1:0]    mc_rx_out,
  output logic [1:0]           mc_rx_ack,
  // Pipelined multiplier
  input  logic                 mp_op_req,
  input  logic [W-1:0]         mp_op_x,
  input  logic [W-1:0]         mp_op_y,
  output logic                 mp_op_ack,
  output logic                 mp_res_req,
  output logic [W-1:0]         mp_res_data,
  input  logic                 mp_res_ack
);
  guardex_shared u_gs (
    .clk, .clr_n,
    .start(gs_start), .c_in(gs_c_in), .d_in(gs_d_in),
    .c_out(gs_c_out), .d_out(gs_d_out),
    .a_ev(gs_a_ev), .b_ev(gs_b_ev), .p_loop(gs_p_loop)
  );

  guardex_mutex u_gm (
    .clk, .clr_n,
    .start(gm_start), .c_in(gm_c_in), .d_in(gm_d_in),
    .c_out(gm_c_out), .d_out(gm_d_out),
    .a_ev(gm_a_ev), .b_ev(gm_b_ev)
  );

  barrier_sync #(.N(3)) u_bs (
    .clk, .clr_n,
    .start(bs_start), .body_done(bs_body_done), .go(bs_go)
  );

  multicast #(.W(W), .NRECV(2)) u_mc (
    .clk, .clr_n,
    .start(mc_start), .ld(mc_ld), .ld_in(mc_ld_in), .ld_ack(mc_ld_ack),
    .a_data(mc_a_data), .a_ack(mc_a_ack),
    .rx_out(mc_rx_out), .rx_ack(mc_rx_ack)
  );

  mult_pipe #(.W(W)) u_mp (
    .clk, .clr_n,
    .op_req(mp_op_req), .op_x(mp_op_x), .op_y(mp_op_y), .op_ack(mp_op_ack),
    .res_req(mp_res_req), .res_data(mp_res_data), .res_ack(mp_res_ack)
  );
endmodule
