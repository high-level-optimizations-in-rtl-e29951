// Self-checking testbench for shifter_2ph: random left and right shift
// requests with random data; checks the shifted value and the acknowledge
// one clock after each request.
module tb_shifter_2ph;
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
  logic lsh = 0, rsh = 0, ack;
  logic [7:0] ain = '0, aout;

  shifter_2ph dut (.clk, .clr_n, .ain, .lsh, .rsh, .aout, .ack);

  initial begin
    logic [7:0] v;
    logic ack0;
    bit left;
    repeat (2) @(posedge clk);
    clr_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      v = 8'($urandom); ain = v; ack0 = ack;
      left = $urandom_range(0, 1) == 1;
      if (left) lsh = ~lsh; else rsh = ~rsh;
      @(posedge clk); #1;
      checks++; if (ack === ack0) failures++;
      checks++; if (aout !== (left ? v << 1 : v >> 1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
