// End-to-end testbench for async_examples_top at its default parameters.
//
// Runs the five circuits concurrently, each with its own environment:
//   Guardex (shared)   : rounds of one c and one d in random order or together
//   Guardex (unshared) : random c, d or both
//   Barrier            : three loop bodies of random length
//   Multicast          : free-running sends with random reloads of x1
//   Multiplier         : random operand pairs, product compared with x*y
// Every result is compared with values computed here. Each mechanism the
// circuits implement is counted and must occur at least once: speculative arm
// undone (CAL and CALL R1;R1), shared-channel second use (CALL R2), ring
// arbiter contention, barrier waiting on a late process, multicast receiver
// re-armed before the sender is released, and adder overlap in the
// multiplier (waits for a busy adder are only reported).
module tb_async_examples_top;
  logic clk = 1'b0, clr_n = 1'b1;
  initial #2 clr_n = 1'b0;   // a real falling edge, so the asynchronous clear acts
  int checks = 0, failures = 0;

  logic gs_start = 0, gs_c_in = 0, gs_d_in = 0;
  logic gs_c_out, gs_d_out, gs_a_ev, gs_b_ev, gs_p_loop;
  logic gm_start = 0, gm_c_in = 0, gm_d_in = 0;
  logic gm_c_out, gm_d_out, gm_a_ev, gm_b_ev;
  logic bs_start = 0, bs_go;
  logic [2:0] bs_body_done = '0;
  logic mc_start = 0, mc_ld = 0, mc_ld_ack, mc_a_ack;
  logic [7:0] mc_ld_in = '0, mc_a_data;
  logic [1:0][7:0] mc_rx_out;
  logic [1:0] mc_rx_ack;
  logic mp_op_req = 0, mp_op_ack, mp_res_req, mp_res_ack = 0;
  logic [7:0] mp_op_x = '0, mp_op_y = '0, mp_res_data;

  async_examples_top dut (.*);

  always #5 clk = ~clk;

  // ---- mechanism counters ----
  int n_cal_undo = 0, n_call_undo = 0, n_call_r2 = 0;
  int n_ring_contend = 0, n_barrier_wait = 0, n_mc_early = 0;
  int n_mp_overlap = 0, n_mp_stall = 0;

  logic mp_go_q = 0, gm_f0_q = 0, gm_f1_q = 0, gs_a1a_q = 0, gs_a1b_q = 0, gs_a2a_q = 0, gs_a2b_q = 0;
  always @(posedge clk) begin
    #1;
    if (clr_n) begin
      // CAL: each win undoes the other arm.
      if (dut.u_gm.fire[0] !== gm_f0_q || dut.u_gm.fire[1] !== gm_f1_q) n_cal_undo++;
      // CALL: guard win -> R1;R1 on the other channel; later use via R2.
      if (dut.u_gs.a1_a !== gs_a1a_q || dut.u_gs.a1_b !== gs_a1b_q) n_call_undo++;
      if (dut.u_gs.a2_a !== gs_a2a_q || dut.u_gs.a2_b !== gs_a2b_q) n_call_r2++;
      if ((gm_c_in ^ gm_c_out) && (gm_d_in ^ gm_d_out)) n_ring_contend++;
      if ((gs_c_in ^ gs_c_out) && (gs_d_in ^ gs_d_out)) n_ring_contend++;
      if (mc_rx_ack[0] !== mc_a_ack && mc_rx_ack[1] !== mc_a_ack) n_mc_early++;
      if (dut.u_mp.u_pz.u_add.busy) begin
        if (dut.u_mp.u_multpipe.go !== mp_go_q) n_mp_overlap++;
        if (dut.u_mp.azx_req !== dut.u_mp.azx_ack) n_mp_stall++;
      end
    end
    gm_f0_q = dut.u_gm.fire[0]; gm_f1_q = dut.u_gm.fire[1];
    gs_a1a_q = dut.u_gs.a1_a; gs_a1b_q = dut.u_gs.a1_b;
    gs_a2a_q = dut.u_gs.a2_a; gs_a2b_q = dut.u_gs.a2_b;
    mp_go_q = dut.u_mp.u_multpipe.go;
  end

  // ---- event counters on the observable channels ----
  int gs_na = 0, gs_nb = 0, gs_nl = 0, gm_na = 0, gm_nb = 0, mc_sends = 0;
  logic gs_a_q = 0, gs_b_q = 0, gs_l_q = 0, gm_a_q = 0, gm_b_q = 0, mc_q = 0;
  always @(posedge clk) begin
    #1;
    if (gs_a_ev !== gs_a_q) gs_na++;
    if (gs_b_ev !== gs_b_q) gs_nb++;
    if (gs_p_loop !== gs_l_q) gs_nl++;
    if (gm_a_ev !== gm_a_q) gm_na++;
    if (gm_b_ev !== gm_b_q) gm_nb++;
    if (mc_a_ack !== mc_q) begin
      mc_sends++;
      checks++; if (mc_rx_out[0] !== mc_rx_out[1]) failures++;
    end
    gs_a_q = gs_a_ev; gs_b_q = gs_b_ev; gs_l_q = gs_p_loop;
    gm_a_q = gm_a_ev; gm_b_q = gm_b_ev; mc_q = mc_a_ack;
  end

  localparam int ROUNDS = 60;

  task automatic env_gs();
    int kind;
    for (int i = 0; i < ROUNDS; i++) begin
      repeat ($urandom_range(0, 4)) @(negedge clk);
      kind = (i < 3) ? 2 : $urandom_range(0, 2);
      if (kind != 1) gs_c_in = ~gs_c_in;
      if (kind != 0) gs_d_in = ~gs_d_in;
      if (kind != 2) begin
        wait (gs_c_out === gs_c_in && gs_d_out === gs_d_in);
        @(negedge clk);
        if (kind == 0) gs_d_in = ~gs_d_in; else gs_c_in = ~gs_c_in;
      end
      wait (gs_c_out === gs_c_in && gs_d_out === gs_d_in && gs_nl == i + 1);
      @(negedge clk);
      checks++; if (gs_na != i + 1 || gs_nb != i + 1) failures++;
    end
  endtask

  task automatic env_gm();
    int kind, nc = 0, nd = 0;
    for (int i = 0; i < ROUNDS; i++) begin
      repeat ($urandom_range(0, 4)) @(negedge clk);
      kind = (i < 3) ? 2 : $urandom_range(0, 2);
      if (kind != 1) begin gm_c_in = ~gm_c_in; nc++; end
      if (kind != 0) begin gm_d_in = ~gm_d_in; nd++; end
      wait (gm_c_out === gm_c_in && gm_d_out === gm_d_in);
      repeat (6) @(negedge clk);
      checks++; if (gm_na != nc || gm_nb != nd) failures++;
    end
  endtask

  task automatic env_bs();
    int len [3];
    int mx;
    logic go0;
    @(negedge clk); go0 = bs_go; bs_start = 1'b1;
    @(posedge clk); #1 checks++; if (bs_go === go0) failures++;
    for (int r = 0; r < ROUNDS; r++) begin
      mx = 0;
      for (int k = 0; k < 3; k++) begin
        len[k] = $urandom_range(1, 6); if (len[k] > mx) mx = len[k];
      end
      go0 = bs_go;
      for (int c = 1; c <= mx; c++) begin
        @(negedge clk);
        for (int k = 0; k < 3; k++) if (len[k] == c) bs_body_done[k] = ~bs_body_done[k];
        @(posedge clk); #1;
        checks++;
        if (c < mx) begin if (bs_go !== go0) failures++; n_barrier_wait++; end
        else        begin if (bs_go === go0) failures++; end
      end
    end
  endtask

  task automatic env_mc();
    logic [7:0] v;
    @(negedge clk); mc_ld_in = 8'hc3; mc_ld = ~mc_ld;
    @(negedge clk); mc_start = 1'b1;
    for (int i = 0; i < ROUNDS; i++) begin
      repeat (8) @(negedge clk);
      checks++; if (mc_rx_out[0] !== mc_a_data || mc_rx_out[1] !== mc_a_data) failures++;
      v = 8'($urandom); mc_ld_in = v; mc_ld = ~mc_ld;
    end
  endtask

  task automatic env_mp();
    logic [7:0] x, y;
    logic r0;
    for (int i = 0; i < ROUNDS; i++) begin
      x = 8'($urandom); y = (i == 0) ? 8'hff : 8'($urandom);
      r0 = mp_res_req;
      @(negedge clk); mp_op_x = x; mp_op_y = y; mp_op_req = ~mp_op_req;
      wait (mp_res_req !== r0);
      @(negedge clk);
      checks++; if (mp_res_data !== 8'(x * y)) failures++;
      mp_res_ack = mp_res_req;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    clr_n = 1'b1;
    @(negedge clk); gs_start = 1'b1; gm_start = 1'b1;
    fork
      env_gs();
      env_gm();
      env_bs();
      env_mc();
      env_mp();
    join
    checks++; if (mc_sends < ROUNDS) failures++;
    $display("mechanisms: cal_undo=%0d call_undo=%0d call_r2=%0d ring_contend=%0d barrier_wait=%0d mc_early=%0d mp_overlap=%0d mp_stall=%0d",
             n_cal_undo, n_call_undo, n_call_r2, n_ring_contend, n_barrier_wait, n_mc_early, n_mp_overlap, n_mp_stall);
    checks++; if (n_cal_undo == 0) failures++;
    checks++; if (n_call_undo == 0) failures++;
    checks++; if (n_call_r2 == 0) failures++;
    checks++; if (n_ring_contend == 0) failures++;
    checks++; if (n_barrier_wait == 0) failures++;
    checks++; if (n_mc_early == 0) failures++;
    checks++; if (n_mp_overlap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
