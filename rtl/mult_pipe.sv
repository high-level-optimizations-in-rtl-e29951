// Pipelined series-parallel multiplier: MULTPIPE || PZ.
//
// Computes res = op_x * op_y modulo 2**W by the shift-and-add recursion
//   MULTFN(x, y, z) = z                        if y = 0
//                   = MULTFN(x, y-1, z+x)      if y odd
//                   = MULTFN(x<<1, y>>1, z)    otherwise
// with z factored out into its own process, so that each z + x runs while the
// control process already decrements and shifts (see multpipe_proc and
// pz_proc). The two processes talk over the internal two-phase channels
// azx (x to add) and sz (send z).
//
// Interface (two-phase, pending while req != ack):
//   op:  op_req, op_x[W-1:0], op_y[W-1:0] -> op_ack     (operands in)
//   res: res_req, res_data[W-1:0]         <- res_ack    (product out)
// Timing: roughly 8 clocks per shift step and 8 per odd step (the addition,
// ADD_LAT clocks, runs in the shadow of the shift step that always follows
// y - 1), plus load and result. A new operand pair is accepted once the
// previous product has been requested from PZ.
module mult_pipe #(
  parameter int unsigned W       = 8,
  parameter int unsigned ADD_LAT = 4
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic         op_req,
  input  logic [W-1:0] op_x,
  input  logic [W-1:0] op_y,
  output logic         op_ack,
  output logic         res_req,
  output logic [W-1:0] res_data,
  input  logic         res_ack
);
  logic         azx_req, azx_ack, sz_req, sz_ack;
  logic [W-1:0] azx_x;

  multpipe_proc #(.W(W)) u_multpipe (
    .clk, .clr_n,
    .op_req, .op_x, .op_y, .op_ack,
    .azx_req, .azx_x, .azx_ack,
    .sz_req, .sz_ack
  );

  pz_proc #(.W(W), .ADD_LAT(ADD_LAT)) u_pz (
    .clk, .clr_n,
    .azx_req, .azx_x, .azx_ack,
    .sz_req, .sz_ack,
    .res_req, .res_data, .res_ack
  );
endmodule
