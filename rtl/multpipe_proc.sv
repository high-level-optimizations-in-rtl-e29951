// MULTPIPE: the control and shift half of the pipelined series-parallel
// multiplier, as a netlist of two-phase macromodules.
//
//   MULTPIPE[x, y] <= (isZero y) -> sz! -> ...
//                   | (not isZero y) -> ((odd y)    -> azx!x -> MULTPIPE[x, y-1])
//                                     | (not odd y) -> MULTPIPE[lshift x, rshift y])
//
// Structure:
//   * Operands: a C-element joins op_req with "ready" (~sz_ack: ready at
//     clear and again after every sz acknowledge) and writes op_x, op_y into
//     the x and y registers; a C-element joins both writes into op_ack.
//   * Loop: a 3-input MERGE of op_ack, odd-step done and even-step done
//     starts each iteration.
//   * Tests: predicate-action block "isZero y"; its false output starts the
//     "odd y" block. isZero true issues sz! (MULTPIPE then waits for operands).
//   * Odd step: the odd-true output is the azx! request, with x bundled on
//     azx_x. Its acknowledge (PZ has taken x) starts the subtractor y - 1,
//     whose result is written into y.
//   * Even step: the odd-false output starts both shifters (x left, y right);
//     a C-element joins them; the results are written into x and y and a
//     C-element joins the two writes.
//   * y has three writers (operand load, y - 1, y >> 1): a CALL element
//     shares y's second write port between the subtractor and the shifter,
//     and the register's own CALL separates that port from the load.
//
// Interface: clk, clr_n; op_req, op_x, op_y, op_ack (passive); azx_req,
// azx_x, azx_ack (active); sz_req, sz_ack (active). Two-phase handshakes.
// Waiting for new operands after sz (instead of re-testing y forever) and the
// constant 1 of the subtractor are this design's choices.
module multpipe_proc #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic         op_req,
  input  logic [W-1:0] op_x,
  input  logic [W-1:0] op_y,
  output logic         op_ack,
  output logic         azx_req,
  output logic [W-1:0] azx_x,
  input  logic         azx_ack,
  output logic         sz_req,
  input  logic         sz_ack
);
  logic         ld, go;
  logic         x_a1, x_a2, y_a1, y_a2;
  logic [W-1:0] x, y;
  logic         zero_f, odd_f;
  logic         sub_ack, odd_done;
  logic [W-1:0] y_dec;
  logic         shx_ack, shy_ack, sh_done, ysh_done, even_done;
  logic [W-1:0] x_sh, y_sh;
  logic         y_rs;

  // ---- operand load ----
  c_element #(.N(2)) u_op (.clk, .clr_n, .in({op_req, ~sz_ack}), .out(ld));
  c_element #(.N(2)) u_ldj (.clk, .clr_n, .in({x_a1, y_a1}), .out(op_ack));

  // ---- registers ----
  shared_reg #(.W(W)) u_x (
    .clk, .clr_n,
    .r1(ld), .d1(op_x), .a1(x_a1),
    .r2(sh_done), .d2(x_sh), .a2(x_a2),
    .q (x)
  );

  // CALL sharing y's second port between y - 1 (R1) and y >> 1 (R2).
  call_element u_ycall (
    .clk, .clr_n,
    .r1(sub_ack), .a1(odd_done),
    .r2(sh_done), .a2(ysh_done),
    .rs(y_rs), .as_i(y_a2)
  );

  shared_reg #(.W(W)) u_y (
    .clk, .clr_n,
    .r1(ld), .d1(op_y), .a1(y_a1),
    .r2(y_rs), .d2((sub_ack ^ odd_done) ? y_dec : y_sh), .a2(y_a2),
    .q (y)
  );

  // ---- loop and tests ----
  assign go = op_ack ^ odd_done ^ even_done;   // 3-input MERGE

  pab #(.W(W), .ODD(1'b0)) u_iszero (.clk, .clr_n, .req(go),     .d(y), .t(sz_req),  .f(zero_f));
  pab #(.W(W), .ODD(1'b1)) u_isodd  (.clk, .clr_n, .req(zero_f), .d(y), .t(azx_req), .f(odd_f));

  // ---- odd step: azx!x, then y - 1 ----
  assign azx_x = x;

  sub_2ph #(.W(W)) u_sub (
    .clk, .clr_n,
    .a(y), .b(W'(1)), .req(azx_ack),
    .d(y_dec), .ack(sub_ack)
  );

  // ---- even step: x << 1, y >> 1 in parallel ----
  shifter_2ph #(.W(W)) u_shx (.clk, .clr_n, .ain(x), .lsh(odd_f), .rsh(1'b0), .aout(x_sh), .ack(shx_ack));
  shifter_2ph #(.W(W)) u_shy (.clk, .clr_n, .ain(y), .lsh(1'b0), .rsh(odd_f), .aout(y_sh), .ack(shy_ack));

  c_element #(.N(2)) u_shj (.clk, .clr_n, .in({shx_ack, shy_ack}), .out(sh_done));
  c_element #(.N(2)) u_wrj (.clk, .clr_n, .in({x_a2, ysh_done}), .out(even_done));
endmodule
