// Self-checking testbench for ring_arbiter (two stages). For each round the
// request levels are set at random (possibly both, possibly none at first,
// with a request raised later) and a token is injected. Checks: exactly one
// grant per token, never to a stage without a request, the first stage wins
// when both request, and a token that finds no request keeps circulating
// until one appears.
module tb_ring_arbiter;
  logic clk = 1'b0, clr_n = 1'b1;
  initial #2 clr_n = 1'b0;   // a real falling edge, so the asynchronous clear acts
  logic enb;
  logic [1:0] g, t, t0;
  int checks = 0, failures = 0;

  ring_arbiter dut (.clk, .clr_n, .enb, .g, .t);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   late, n;
    logic [1:0] want;
    enb = 0; g = 0;
    repeat (2) @(posedge clk);
    clr_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      late = $urandom_range(0, 3);         // 0: requests present at injection
      want = 2'($urandom_range(1, 3));
      g = (late == 0) ? want : 2'b00;
      t0 = t;
      enb = ~enb;
      if (late != 0) begin
        repeat (late * 3) @(negedge clk);
        checks++; if (t !== t0) failures++; // nothing granted without request
        g = want;
      end
      n = 0;
      while (t === t0 && n < 20) begin @(posedge clk); #1; n++; end
      checks++; if (n >= 20) failures++;
      checks++; if ($countones(t ^ t0) != 1) failures++;
      checks++; if (((t ^ t0) & ~want) != 0) failures++;
      if (late == 0 && want == 2'b11) begin
        checks++; if ((t ^ t0) != 2'b01) failures++;
      end
      @(negedge clk); g = 0;
      repeat (4) @(posedge clk);
      #1 checks++; if ($countones(t ^ t0) != 1) failures++; // ring quiet
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
