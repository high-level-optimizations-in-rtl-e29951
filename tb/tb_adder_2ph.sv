// Self-checking testbench for adder_2ph (default LAT = 4): random operands,
// checks sum and carry against a + b and that the acknowledge comes exactly
// LAT clocks after the request, not earlier.
module tb_adder_2ph;
  localparam int LAT = 4;
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
  logic req = 0, ack, cout;
  logic [7:0] a = '0, b = '0, sum;

  adder_2ph dut (.clk, .clr_n, .a, .b, .req, .sum, .cout, .ack);

  initial begin
    int n;
    logic [8:0] full;
    repeat (2) @(posedge clk);
    clr_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      a = 8'($urandom); b = 8'($urandom);
      full = {1'b0, a} + {1'b0, b};
      req = ~req;
      n = 0;
      while (ack !== req && n < 20) begin @(posedge clk); #1; n++; end
      checks++; if (n != LAT) failures++;
      checks++; if ({cout, sum} !== full) failures++;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
