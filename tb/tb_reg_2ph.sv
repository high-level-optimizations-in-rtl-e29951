// Self-checking testbench for reg_2ph: issues request transitions with random
// data and checks that the acknowledge transition comes exactly one clock
// later with q holding that data, and that q is left alone without a request.
module tb_reg_2ph;
  logic clk = 1'b0, clr_n = 1'b1;
  initial #2 clr_n = 1'b0;   // a real falling edge, so the asynchronous clear acts
  logic req;
  logic [7:0] d, q;
  logic ack;
  int checks = 0, failures = 0;

  reg_2ph dut (.clk, .clr_n, .req, .d, .ack, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    req = 1'b0; d = '0;
    repeat (2) @(posedge clk);
    checks++; if (q !== '0 || ack !== 1'b0) failures++;
    clr_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      v = 8'($urandom);
      d = v; req = ~req;
      @(posedge clk); #1;
      checks++; if (ack !== req) failures++;
      checks++; if (q !== v) failures++;
      // Data changes without a request must not be taken.
      @(negedge clk); d = ~v;
      repeat ($urandom_range(1, 3)) @(posedge clk);
      #1; checks++; if (q !== v) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
