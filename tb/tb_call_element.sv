// Self-checking testbench for call_element. A client model calls through R1
// or R2 at random; a server model answers each RS transition with an AS
// transition after a random delay. Checks: one RS transition per call, the
// acknowledge returns on the caller's A line only, and the R1;R1 sequence
// (call then withdraw with no server answer) gives RS;RS and leaves the
// element working normally afterwards.
module tb_call_element;
  logic clk = 1'b0, clr_n = 1'b1;
  initial #2 clr_n = 1'b0;   // a real falling edge, so the asynchronous clear acts
  logic r1, r2, as_i;
  logic a1, a2, rs;
  int checks = 0, failures = 0;

  call_element dut (.clk, .clr_n, .r1, .a1, .r2, .a2, .rs, .as_i);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic rs0, a10, a20;
    bit   use1;
    r1 = 0; r2 = 0; as_i = 0;
    repeat (2) @(posedge clk);
    clr_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        // R1;R1: withdraw a call before it is served.
        rs0 = rs; a10 = a1; a20 = a2;
        r1 = ~r1;
        #1 checks++; if (rs === rs0) failures++;
        repeat ($urandom_range(1, 3)) @(negedge clk);
        r1 = ~r1;
        #1 checks++; if (rs !== rs0) failures++;
        repeat (3) @(posedge clk);
        #1 checks++; if (a1 !== a10 || a2 !== a20) failures++;
      end else begin
        use1 = $urandom_range(0, 1) == 1;
        rs0 = rs; a10 = a1; a20 = a2;
        if (use1) r1 = ~r1; else r2 = ~r2;
        #1 checks++; if (rs === rs0) failures++;
        repeat ($urandom_range(1, 4)) @(negedge clk);
        checks++; if (a1 !== a10 || a2 !== a20) failures++;  // no early ack
        as_i = ~as_i;
        @(posedge clk); #1;
        checks++;
        if (use1) begin if (a1 === a10 || a2 !== a20) failures++; end
        else      begin if (a2 === a20 || a1 !== a10) failures++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
