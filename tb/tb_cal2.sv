// Self-checking testbench for cal2 (default DELAY = 2). Plays a process that
// loops on the guard (a? | b?): each completion re-arms the guard through a
// MERGE, as in the compiled circuit. A sender model offers one request per
// round on a random channel. Checks: the chosen channel fires one clock after
// its request, the other never fires (its speculative arm was undone), and the
// completion follows exactly DELAY clocks after the fire.
module tb_cal2;
  localparam int DELAY = 2;
  logic clk = 1'b0, clr_n = 1'b1;
  initial #2 clr_n = 1'b0;   // a real falling edge, so the asynchronous clear acts
  logic start;
  logic [1:0] req, fire, done;
  logic p_go;
  int checks = 0, failures = 0;

  assign p_go = start ^ done[0] ^ done[1];

  cal2 dut (.clk, .clr_n, .start(p_go), .req, .fire, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ch;
    logic [1:0] f0, d0;
    start = 0; req = 0;
    repeat (2) @(posedge clk);
    clr_n = 1'b1;
    @(negedge clk); start = 1'b1;
    for (int i = 0; i < 400; i++) begin
      repeat ($urandom_range(0, 4)) @(negedge clk);
      ch = $urandom_range(0, 1);
      f0 = fire; d0 = done;
      req[ch] = ~req[ch];
      @(posedge clk); #1;
      checks++; if ((fire ^ f0) != (2'b01 << ch)) failures++;
      repeat (DELAY - 1) begin
        @(posedge clk); #1;
        checks++; if (done !== d0) failures++;
      end
      @(posedge clk); #1;
      checks++; if ((done ^ d0) != (2'b01 << ch)) failures++;
      checks++; if ((fire ^ f0) != (2'b01 << ch)) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
