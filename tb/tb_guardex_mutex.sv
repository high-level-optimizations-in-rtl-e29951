// Self-checking testbench for guardex_mutex. The environment offers c, d or
// both at once in each round and waits for every offer to be acknowledged.
// Checks: each c is passed on by Q as exactly one a, each d as one b, a and b
// never complete on the same clock, no offer waits longer than a bound, and
// when c and d are offered together both are served (one per round of Q).
module tb_guardex_mutex;
  logic clk = 1'b0, clr_n = 1'b1;
  initial #2 clr_n = 1'b0;   // a real falling edge, so the asynchronous clear acts
  logic start, c_in, d_in, c_out, d_out, a_ev, b_ev;
  int checks = 0, failures = 0;
  int n_a = 0, n_b = 0, n_c = 0, n_d = 0;

  guardex_mutex dut (.clk, .clr_n, .start, .c_in, .d_in, .c_out, .d_out, .a_ev, .b_ev);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic a_q = 0, b_q = 0;
  always @(posedge clk) begin
    #1;
    if (a_ev !== a_q) n_a++;
    if (b_ev !== b_q) n_b++;
    if (clr_n) begin
      checks++; if (a_ev !== a_q && b_ev !== b_q) failures++;
    end
    a_q = a_ev; b_q = b_ev;
  end

  initial begin
    int kind, n;
    start = 0; c_in = 0; d_in = 0;
    repeat (2) @(posedge clk);
    clr_n = 1'b1;
    @(negedge clk); start = 1'b1;
    for (int i = 0; i < 300; i++) begin
      repeat ($urandom_range(0, 5)) @(negedge clk);
      kind = $urandom_range(0, 2);          // 0: c, 1: d, 2: both
      if (kind != 1) begin c_in = ~c_in; n_c++; end
      if (kind != 0) begin d_in = ~d_in; n_d++; end
      n = 0;
      while ((c_out !== c_in || d_out !== d_in) && n < 40) begin @(negedge clk); n++; end
      checks++; if (n >= 40) failures++;
      repeat (6) @(negedge clk);
      checks++; if (n_a != n_c) failures++;
      checks++; if (n_b != n_d) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
