// Self-checking testbench for delay_line: drives random transitions into a
// delay line of the default depth (2) and one of depth 8, and checks that
// each output equals the input of exactly DEPTH clocks earlier.
module tb_delay_line;
  logic clk = 1'b0, clr_n = 1'b1;
  initial #2 clr_n = 1'b0;   // a real falling edge, so the asynchronous clear acts
  logic in;
  logic out2, out8;
  logic [15:0] hist;    // hist[k] = input k+1 clocks ago
  int checks = 0, failures = 0;

  delay_line                dut2 (.clk, .clr_n, .in, .out(out2));
  delay_line #(.DEPTH(8))   dut8 (.clk, .clr_n, .in, .out(out8));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 1'b0; hist = '0;
    repeat (2) @(posedge clk);
    clr_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      in = $urandom_range(0, 1) == 1;
      @(posedge clk); #1;
      hist = {hist[14:0], in};
      if (i >= 8) begin
        checks++; if (out2 !== hist[1]) failures++;
        checks++; if (out8 !== hist[7]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
