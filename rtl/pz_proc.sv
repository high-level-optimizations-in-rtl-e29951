// PZ: the accumulator half of the pipelined series-parallel multiplier, as a
// netlist of two-phase macromodules.
//
//   PZ[z] <= (sz? -> result!z -> PZ[z]) | (azx?x1 -> PZ[x1 + z])
//
// z is private to this process and reached only through two operations. The
// guard (sz? | azx?) is mutually exclusive -- MULTPIPE is sequential and
// never offers both -- so it is a speculative two-input CAL component
// (cal2): both channels are armed, the one that fires undoes the other. The
// CAL's C-element outputs are the channel acknowledges; its foam-wrapped
// (delayed) completions start the actions:
//   * azx: latch x1, start the adder (x1 + z), write the sum into z;
//   * sz:  offer z on the result channel; when it is acknowledged, clear z
//          (so the next product starts from 0).
// The z register has two writers (sum, clear) and is a shared register. The
// loop MERGE of the two write acknowledges re-arms the guard. The CAL starts
// armed after clear (its start input is the inverted loop signal).
//
// Interface: clk, clr_n; azx_req, azx_x, azx_ack (passive); sz_req, sz_ack
// (passive); res_req, res_data, res_ack (active). Two-phase handshakes.
// Clearing z and the adder latency ADD_LAT are this design's choices.
module pz_proc #(
  parameter int unsigned W       = 8,
  parameter int unsigned ADD_LAT = 4,
  parameter int unsigned DELAY   = 2
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic         azx_req,
  input  logic [W-1:0] azx_x,
  output logic         azx_ack,
  input  logic         sz_req,
  output logic         sz_ack,
  output logic         res_req,
  output logic [W-1:0] res_data,
  input  logic         res_ack
);
  logic [1:0]   fire, done;
  logic         pz_go, arm;
  logic         x1_ack, add_ack, z_a1, z_a2;
  logic [W-1:0] x1, sum, z;
  logic         cout;

  assign pz_go = z_a1 ^ z_a2;   // loop MERGE
  assign arm   = ~pz_go;

  cal2 #(.DELAY(DELAY)) u_cal (
    .clk, .clr_n,
    .start(arm),
    .req  ({sz_req, azx_req}),
    .fire (fire),
    .done (done)
  );

  assign azx_ack = fire[0];
  assign sz_ack  = fire[1];

  // azx?x1 -> z := x1 + z
  reg_2ph #(.W(W)) u_x1 (.clk, .clr_n, .req(done[0]), .d(azx_x), .ack(x1_ack), .q(x1));

  adder_2ph #(.W(W), .LAT(ADD_LAT)) u_add (
    .clk, .clr_n,
    .a(x1), .b(z), .req(x1_ack),
    .sum, .cout, .ack(add_ack)
  );

  // sz? -> result!z -> z := 0
  assign res_req  = done[1];
  assign res_data = z;

  shared_reg #(.W(W)) u_z (
    .clk, .clr_n,
    .r1(add_ack), .d1(sum), .a1(z_a1),
    .r2(res_ack), .d2('0),  .a2(z_a2),
    .q (z)
  );
endmodule
