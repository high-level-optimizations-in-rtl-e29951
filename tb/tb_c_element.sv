// Self-checking testbench for c_element: drives random inputs into a
// two-input and a three-input C-element and compares each output, one clock
// later, with a reference model (set when all inputs are 1, clear when all
// are 0, hold otherwise). Also checks the clear value.
module tb_c_element;
  logic clk = 1'b0, clr_n = 1'b1;
  initial #2 clr_n = 1'b0;   // a real falling edge, so the asynchronous clear acts
  logic [1:0] in2;
  logic [2:0] in3;
  logic out2, out3;
  logic exp2, exp3;
  int checks = 0, failures = 0;

  c_element #(.N(2)) dut2 (.clk, .clr_n, .in(in2), .out(out2));
  c_element #(.N(3)) dut3 (.clk, .clr_n, .in(in3), .out(out3));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in2 = '0; in3 = '0;
    repeat (2) @(posedge clk);
    checks++; if (out2 !== 1'b0 || out3 !== 1'b0) failures++;
    clr_n = 1'b1;
    exp2 = 1'b0; exp3 = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // Bias towards agreeing inputs so set and clear both happen often.
      in2 = ($urandom_range(0, 3) == 0) ? {2{in2[0]}} : 2'($urandom);
      in3 = ($urandom_range(0, 2) == 0) ? {3{$urandom_range(0, 1) == 1}} : 3'($urandom);
      if (&in2) exp2 = 1'b1; else if (~|in2) exp2 = 1'b0;
      if (&in3) exp3 = 1'b1; else if (~|in3) exp3 = 1'b0;
      @(posedge clk); #1;
      checks++; if (out2 !== exp2) failures++;
      checks++; if (out3 !== exp3) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
