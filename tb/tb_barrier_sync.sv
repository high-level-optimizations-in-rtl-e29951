// Self-checking testbench for barrier_sync with three processes. After each
// barrier (a transition on go) every process runs a loop body of random
// length and then signals body_done. Checks: go toggles exactly one clock
// after the last process is back, never earlier, once per round.
module tb_barrier_sync;
  logic clk = 1'b0, clr_n = 1'b1;
  initial #2 clr_n = 1'b0;   // a real falling edge, so the asynchronous clear acts
  logic start;
  logic [2:0] body_done;
  logic go;
  int checks = 0, failures = 0;

  barrier_sync dut (.clk, .clr_n, .start, .body_done, .go);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   len [3];
    int   maxlen;
    logic go0;
    start = 0; body_done = 0;
    repeat (2) @(posedge clk);
    clr_n = 1'b1;
    @(negedge clk); go0 = go; start = 1'b1;
    @(posedge clk); #1;
    checks++; if (go === go0) failures++;
    for (int r = 0; r < 300; r++) begin
      maxlen = 0;
      for (int k = 0; k < 3; k++) begin
        len[k] = $urandom_range(1, 8);
        if (len[k] > maxlen) maxlen = len[k];
      end
      go0 = go;
      for (int c = 1; c <= maxlen; c++) begin
        @(negedge clk);
        for (int k = 0; k < 3; k++) if (len[k] == c) body_done[k] = ~body_done[k];
        @(posedge clk); #1;
        checks++;
        if (c < maxlen) begin if (go !== go0) failures++; end
        else            begin if (go === go0) failures++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
