// Self-checking testbench for pab: one "is zero" and one "is odd" block get
// request transitions with random data (zero made frequent); the answer must
// come one clock later on t exactly when the predicate holds, else on f.
module tb_pab;
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
  logic req = 0;
  logic [7:0] d = '0;
  logic zt, zf, ot, of_;

  pab #(.ODD(1'b0)) dut_z (.clk, .clr_n, .req, .d, .t(zt), .f(zf));
  pab #(.ODD(1'b1)) dut_o (.clk, .clr_n, .req, .d, .t(ot), .f(of_));

  initial begin
    logic zt0, zf0, ot0, of0;
    repeat (2) @(posedge clk);
    clr_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      d = ($urandom_range(0, 3) == 0) ? 8'd0 : 8'($urandom);
      zt0 = zt; zf0 = zf; ot0 = ot; of0 = of_;
      req = ~req;
      @(posedge clk); #1;
      checks++; if ((zt !== zt0) !== (d == 0) || (zf !== zf0) !== (d != 0)) failures++;
      checks++; if ((ot !== ot0) !== d[0] || (of_ !== of0) !== !d[0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
