// Self-checking testbench for guardex_shared. Each round of P needs one a and
// one b; the environment offers c and d in a random order (c first, d first,
// or both together) and waits for both acknowledges. Checks: one a per c, one
// b per d, exactly one loop of P per round, the channel offered first is the
// one P's guard takes (a before b when c is offered first, and vice versa),
// the losing speculative arm never fires, and no round exceeds a bound.
module tb_guardex_shared;
  logic clk = 1'b0, clr_n = 1'b1;
  initial #2 clr_n = 1'b0;   // a real falling edge, so the asynchronous clear acts
  logic start, c_in, d_in, c_out, d_out, a_ev, b_ev, p_loop;
  int checks = 0, failures = 0;
  int n_a = 0, n_b = 0, n_loop = 0;
  int first;             // 0: a completed first in the round, 1: b
  int got;               // completions seen in the round

  guardex_shared dut (.clk, .clr_n, .start, .c_in, .d_in, .c_out, .d_out, .a_ev, .b_ev, .p_loop);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic a_q = 0, b_q = 0, l_q = 0;
  always @(posedge clk) begin
    #1;
    if (a_ev !== a_q) begin n_a++; if (got == 0) first = 0; got++; end
    if (b_ev !== b_q) begin n_b++; if (got == 0) first = 1; got++; end
    if (p_loop !== l_q) n_loop++;
    a_q = a_ev; b_q = b_ev; l_q = p_loop;
  end

  initial begin
    int kind, n, loops0;
    start = 0; c_in = 0; d_in = 0;
    repeat (2) @(posedge clk);
    clr_n = 1'b1;
    @(negedge clk); start = 1'b1;
    for (int i = 0; i < 300; i++) begin
      repeat ($urandom_range(0, 5)) @(negedge clk);
      kind = $urandom_range(0, 2);          // 0: c then d, 1: d then c, 2: both
      got = 0; first = -1; loops0 = n_loop;
      if (kind == 0 || kind == 2) c_in = ~c_in;
      if (kind == 1 || kind == 2) d_in = ~d_in;
      if (kind != 2) begin
        n = 0;
        while (got == 0 && n < 40) begin @(negedge clk); n++; end
        checks++; if (n >= 40) failures++;
        checks++; if (first != kind) failures++;
        repeat ($urandom_range(0, 12)) @(negedge clk);
        if (kind == 0) d_in = ~d_in; else c_in = ~c_in;
      end
      n = 0;
      while ((got < 2 || n_loop == loops0) && n < 80) begin @(negedge clk); n++; end
      checks++; if (n >= 80) failures++;
      repeat (4) @(negedge clk);
      checks++; if (c_out !== c_in || d_out !== d_in) failures++;
      checks++; if (n_a != i + 1 || n_b != i + 1) failures++;
      checks++; if (n_loop != i + 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
