// Self-checking testbench for mult_pipe (8 bits, default adder latency 4).
// Sends operand pairs (edge values and random ones), waits for each product
// and compares it with x*y mod 256 computed here. Also checks the latency
// against an upper bound per step and requires that the accumulator's adder
// was at least once still busy while the control process started further
// iterations (the overlap the process split is there for). How often the
// next x had to wait for a busy adder is reported; with ADD_LAT = 4 the shift
// step that always follows y - 1 hides the addition, so it does not happen.
module tb_mult_pipe;
  localparam int ADD_LAT = 4;
  logic clk = 1'b0, clr_n = 1'b1;
  initial #2 clr_n = 1'b0;   // a real falling edge, so the asynchronous clear acts
  logic op_req, op_ack, res_req, res_ack;
  logic [7:0] op_x, op_y, res_data;
  int checks = 0, failures = 0;
  int overlap = 0;
  int total_cycles = 0;

  mult_pipe dut (.clk, .clr_n, .op_req, .op_x, .op_y, .op_ack, .res_req, .res_data, .res_ack);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Overlap: a new MULTPIPE iteration starts while PZ's adder is busy.
  // Stall: MULTPIPE offers x on azx while the adder is still busy.
  int stall = 0;
  logic go_q = 1'b0;
  always @(posedge clk) begin
    if (dut.u_pz.u_add.busy && dut.u_multpipe.go !== go_q) overlap++;
    if (dut.u_pz.u_add.busy && dut.u_multpipe.azx_req !== dut.u_multpipe.azx_ack) stall++;
    go_q = dut.u_multpipe.go;
  end

  // Cycle bound, from the netlist: at most 8 clocks per shift step and
  // 10 + ADD_LAT per odd step, plus 20 for load and result.
  function automatic int max_cycles(logic [7:0] y);
    int t = 20;
    int yy = y;
    while (yy != 0) begin
      if (yy % 2 == 1) begin t += 10 + ADD_LAT; yy--; end
      else             begin t += 8; yy = yy / 2; end
    end
    return t;
  endfunction

  task automatic run(input logic [7:0] x, input logic [7:0] y);
    int n = 0;
    logic r0 = res_req;
    @(negedge clk);
    op_x = x; op_y = y; op_req = ~op_req;
    while (res_req === r0 && n < 200) begin @(posedge clk); #1; n++; end
    checks++; if (res_data !== 8'(x * y)) failures++;
    checks++; if (n > max_cycles(y)) failures++;
    total_cycles += n;
    checks++; if (op_ack !== op_req) failures++;
    @(negedge clk); res_ack = res_req;
  endtask

  initial begin
    op_req = 0; res_ack = 0; op_x = 0; op_y = 0;
    repeat (2) @(posedge clk);
    clr_n = 1'b1;
    run(8'd0, 8'd0); run(8'd7, 8'd0); run(8'd0, 8'd9); run(8'd1, 8'd1);
    run(8'd255, 8'd255); run(8'd13, 8'd11); run(8'd16, 8'd16); run(8'd3, 8'd128);
    for (int i = 0; i < 500; i++) run(8'($urandom), 8'($urandom));
    checks++; if (overlap == 0) failures++;
    $display("products=508 clocks=%0d overlap=%0d stall=%0d", total_cycles, overlap, stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
