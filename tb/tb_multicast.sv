// Self-checking testbench for multicast (8 bits, two receivers). Loads x1,
// starts the free-running sender and receivers, and reloads x1 with random
// values. Checks: every send completes (a_ack) only after both receivers have
// latched, both receivers then hold the same value, that value is the loaded
// x1 once a load has settled, and a send takes three clocks.
module tb_multicast;
  logic clk = 1'b0, clr_n = 1'b1;
  initial #2 clr_n = 1'b0;   // a real falling edge, so the asynchronous clear acts
  logic start, ld, ld_ack, a_ack;
  logic [7:0] ld_in, a_data;
  logic [1:0][7:0] rx_out;
  logic [1:0] rx_ack;
  int checks = 0, failures = 0;
  int sends = 0;

  multicast dut (.clk, .clr_n, .start, .ld, .ld_in, .ld_ack, .a_data, .a_ack, .rx_out, .rx_ack);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Every completion: both receivers hold the same word, both latched this round.
  logic a_ack_q;
  logic [1:0] rx_ack_at_send;
  int last_send_cycle = -1, cycle = 0;
  always @(posedge clk) begin
    #1;
    cycle++;
    if (clr_n && a_ack !== a_ack_q) begin
      sends++;
      checks++; if (rx_out[0] !== rx_out[1]) failures++;
      checks++; if (rx_ack !== {2{a_ack}}) failures++;
      if (last_send_cycle >= 0) begin
        checks++; if (cycle - last_send_cycle != 3) failures++;
      end
      last_send_cycle = cycle;
    end
    a_ack_q = a_ack;
  end

  initial begin
    logic [7:0] v;
    start = 0; ld = 0; ld_in = 0; a_ack_q = 0;
    repeat (2) @(posedge clk);
    clr_n = 1'b1;
    @(negedge clk); ld_in = 8'h5a; ld = ~ld;
    @(posedge clk); #1 checks++; if (ld_ack !== ld || a_data !== 8'h5a) failures++;
    @(negedge clk); start = 1'b1;
    repeat (10) @(posedge clk);
    #1 checks++; if (rx_out[0] !== 8'h5a || rx_out[1] !== 8'h5a) failures++;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      v = 8'($urandom);
      ld_in = v; ld = ~ld;
      repeat (8) @(posedge clk);
      #1 checks++; if (rx_out[0] !== v || rx_out[1] !== v) failures++;
    end
    checks++; if (sends < 400) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
