// Self-checking testbench for sub_2ph: random operands, checks a - b modulo
// 256 and the acknowledge one clock after each request.
module tb_sub_2ph;
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
  logic req = 0, ack;
  logic [7:0] a = '0, b = '0, d;

  sub_2ph dut (.clk, .clr_n, .a, .b, .req, .d, .ack);

  initial begin
    repeat (2) @(posedge clk);
    clr_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      a = 8'($urandom); b = (i % 3 == 0) ? 8'd1 : 8'($urandom);
      req = ~req;
      @(posedge clk); #1;
      checks++; if (ack !== req) failures++;
      checks++; if (d !== 8'(a - b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
