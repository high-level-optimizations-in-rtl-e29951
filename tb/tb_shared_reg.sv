// Self-checking testbench for shared_reg: two writers take turns at random,
// each with random data. Checks that the register takes the calling writer's
// data, that the acknowledge returns to that writer only, and that it comes
// two clocks after the request.
module tb_shared_reg;
  logic clk = 1'b0, clr_n = 1'b1;
  initial #2 clr_n = 1'b0;   // a real falling edge, so the asynchronous clear acts
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic r1 = 0, r2 = 0, a1, a2;
  logic [7:0] d1 = '0, d2 = '0, q;

  shared_reg dut (.clk, .clr_n, .r1, .d1, .a1, .r2, .d2, .a2, .q);

  initial begin
    logic a10, a20;
    bit one;
    int n;
    repeat (2) @(posedge clk);
    clr_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      d1 = 8'($urandom); d2 = 8'($urandom);
      a10 = a1; a20 = a2;
      one = $urandom_range(0, 1) == 1;
      if (one) r1 = ~r1; else r2 = ~r2;
      n = 0;
      while (a1 === a10 && a2 === a20 && n < 10) begin @(posedge clk); #1; n++; end
      checks++; if (n != 2) failures++;
      checks++; if (one ? (a1 === a10 || a2 !== a20) : (a2 === a20 || a1 !== a10)) failures++;
      checks++; if (q !== (one ? d1 : d2)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
