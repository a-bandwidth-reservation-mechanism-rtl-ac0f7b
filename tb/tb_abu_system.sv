// tb_abu_system: end-to-end test of four ABUs in a shared-memory system.
//
// Four DMA-like HW-task models reach one in-order memory sink through their
// ABUs and a round-robin interconnect model, as in the evaluated platform
// (HW-tasks -> ABUs -> AXI interconnect -> FPGA-PS port -> DRAM). The ABU
// array runs with its default size and all ABUs use P = 128 cycles. The
// test counts, on its own, the address handshakes each ABU lets through in
// every period and checks:
//   1. reservation: with every task asking for all the bandwidth it can get,
//      task i gets exactly B_i transactions in every period (B = 16, 12, 8, 4);
//   2. isolation: the same holds for task 0 when it runs alone and when the
//      other three flood the bus, so a misbehaving task cannot steal from it;
//   3. response time: a job of N = 40 transactions under B = 16 started at a
//      period boundary finishes in its third period (2P < R <= 3P), as the
//      budget B_i = N_i * P / T_i analysis predicts, while the others flood;
//   4. spatial isolation: task 2 reads outside its window; the read never
//      reaches memory, irq[2] rises with the address, the other tasks keep
//      their exact budgets, and after the processor stops the task and
//      clears the interrupt task 2 gets its budget back.
// It also counts how often each mechanism happened (refills, throttling,
// arbitration conflicts, held write data, violations, clears, finished jobs)
// and fails if one never did.
module tb_abu_system;
  import abu_pkg::*;

  localparam int unsigned N = 4;
  localparam int unsigned P = 128;

  logic                  clk = 1'b0, rst_n = 1'b0;
  abu_cfg_t    [N-1:0]   cfg;
  logic        [N-1:0]   irq_clear, irq;
  axi_req_t    [N-1:0]   task_req, ic_req;
  axi_resp_t   [N-1:0]   task_resp, ic_resp;
  abu_status_t [N-1:0]   status;
  axi_req_t              mem_req;
  axi_resp_t             mem_resp;
  int unsigned           conflicts, mem_reads, mem_writes;

  logic        [N-1:0]   go, bad, kill, busy;
  int unsigned           job_len [N];
  int unsigned           resp_time [N];
  int unsigned           jobs_done [N];

  int checks = 0, failures = 0;

  localparam addr_t BAD = 32'h0000_8000;   // outside every window

  function automatic addr_t win(input int i);
    return 32'h1000_0000 + addr_t'(i) * 32'h0100_0000;
  endfunction

  abu_system dut (
    .clk, .rst_n, .cfg, .irq_clear, .task_req, .task_resp, .ic_req, .ic_resp,
    .irq, .status
  );

  axi_rr_interconnect_model #(.N(N)) u_ic (
    .clk, .rst_n, .s_req(ic_req), .s_resp(ic_resp), .m_req(mem_req),
    .m_resp(mem_resp), .conflicts
  );

  axi_sink_model u_mem (
    .clk, .rst_n, .req(mem_req), .resp(mem_resp), .reads(mem_reads), .writes(mem_writes)
  );

  for (genvar i = 0; i < N; i++) begin : g_task
    hw_task_model u_task (
      .clk, .rst_n, .go(go[i]), .job_len(job_len[i]), .base(win(i)), .bad(bad[i]),
      .bad_addr(BAD), .kill(kill[i]), .req(task_req[i]), .resp(task_resp[i]),
      .busy(busy[i]), .resp_time(resp_time[i]), .jobs_done(jobs_done[i])
    );
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (60_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 30) $display("FAIL @%0t %s", $time, msg);
  endtask

  // ------------------------------------------------------------ scoreboard
  int unsigned cyc = 0;
  int unsigned cnt [N];
  int unsigned bper [N];             // budget loaded for the current period
  bit          exact [N];            // task i is greedy: expect exactly B_i
  int unsigned n_refill = 0, n_throttled = 0, n_w_held = 0, n_viol = 0, n_clear = 0;
  int unsigned n_exact_periods = 0;
  logic [N-1:0] irq_q = '0;

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc = 0;
      foreach (cnt[i]) begin
        cnt[i]  = 0;
        bper[i] = int'(cfg[i].budget);
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        cnt[i] += int'(ic_req[i].ar_valid && ic_resp[i].ar_ready)
                + int'(ic_req[i].aw_valid && ic_resp[i].aw_ready);
        if (status[i].throttled) n_throttled++;
        if (task_req[i].w_valid && !ic_req[i].w_valid) n_w_held++;
        if (irq[i] && !irq_q[i]) n_viol++;
        if (!irq[i] && irq_q[i]) n_clear++;
        // nothing outside the windows reaches the interconnect
        checks++;
        if ((ic_req[i].ar_valid && ic_req[i].ar.addr == BAD) ||
            (ic_req[i].aw_valid && ic_req[i].aw.addr == BAD))
          fail($sformatf("task %0d: request outside its window passed", i));
      end
      irq_q = irq;
      if (cyc % P == P - 1) begin
        n_refill++;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (!status[i].period_end) fail($sformatf("ABU %0d period end not at cycle %0d", i, cyc));
          checks++;
          if (cnt[i] > bper[i])
            fail($sformatf("ABU %0d passed %0d > B=%0d", i, cnt[i], bper[i]));
          if (exact[i]) begin
            checks++;
            n_exact_periods++;
            if (cnt[i] != bper[i])
              fail($sformatf("ABU %0d passed %0d, B=%0d", i, cnt[i], bper[i]));
          end
          cnt[i]  = 0;
          bper[i] = int'(cfg[i].budget);   // refilled with what is set now
        end
      end
      cyc++;
    end
  end

  // wait for the start of the next period (the cycle after a period end)
  task automatic next_period();
    do @(posedge clk); while (cyc % P != 0);
    #1;
  endtask

  task automatic periods(input int k);
    repeat (k) next_period();
  endtask

  initial begin
    automatic int unsigned b [N] = '{16, 12, 8, 4};
    cfg = '0;
    for (int i = 0; i < N; i++) begin
      cfg[i].budget       = cnt_t'(b[i]);
      cfg[i].period       = cnt_t'(P);
      cfg[i].seg[0].base  = win(i);
      cfg[i].seg[0].size  = 32'h0001_0000;
      cfg[i].seg[3].base  = 32'h3000_0000;        // a shared buffer
      cfg[i].seg[3].size  = 32'h0000_1000;
      job_len[i] = 0;
      exact[i]   = 1'b0;
    end
    go = '0; bad = '0; kill = '0; irq_clear = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 2a. task 0 alone
    go[0] = 1'b1; @(posedge clk); #1 go[0] = 1'b0;
    next_period();
    exact[0] = 1'b1;
    periods(4);
    // 1 + 2b. everybody floods the bus
    go[3:1] = 3'b111; @(posedge clk); #1 go = '0;
    next_period();
    exact[1] = 1'b1; exact[2] = 1'b1; exact[3] = 1'b1;
    periods(6);
    checks++;
    if (conflicts == 0) fail("no arbitration conflict seen");

    // 3. a job of 40 transactions on task 0 (B = 16) while the others flood
    exact[0] = 1'b0;
    kill[0] = 1'b1; @(posedge clk); #1 kill[0] = 1'b0;
    do @(posedge clk); while (cyc % P != P - 1);
    #1 job_len[0] = 40; go[0] = 1'b1;          // starts with the next period
    @(posedge clk); #1 go[0] = 1'b0;
    wait (busy[0] == 1'b0);
    @(posedge clk); #1;
    checks++;
    if (!(resp_time[0] > 2 * P && resp_time[0] <= 3 * P))
      fail($sformatf("job of 40 under B=16 took %0d cycles, expected (%0d, %0d]",
                     resp_time[0], 2 * P, 3 * P));
    $display("job of 40 transactions, B=16, P=%0d: response time %0d cycles", P, resp_time[0]);
    // a second job: B raised to 40 = N, so one period suffices
    cfg[0].budget = 16'd40;
    do @(posedge clk); while (cyc % P != P - 1);
    #1 go[0] = 1'b1;
    @(posedge clk); #1 go[0] = 1'b0;
    wait (busy[0] == 1'b0);
    @(posedge clk); #1;
    checks++;
    if (!(resp_time[0] <= P))
      fail($sformatf("job of 40 under B=40 took %0d cycles, expected <= %0d", resp_time[0], P));
    $display("job of 40 transactions, B=40, P=%0d: response time %0d cycles", P, resp_time[0]);
    cfg[0].budget = 16'd16;
    job_len[0] = 0; go[0] = 1'b1; @(posedge clk); #1 go[0] = 1'b0;
    next_period();
    exact[0] = 1'b1;
    periods(2);

    // 4. task 2 reads outside its window
    exact[2] = 1'b0;
    bad[2] = 1'b1; @(posedge clk); #1 bad[2] = 1'b0;
    wait (irq[2] == 1'b1);
    @(posedge clk); #1;
    checks++;
    if (status[2].viol_addr != BAD || status[2].viol_write || irq[0] || irq[1] || irq[3])
      fail("violation record or interrupt wrong");
    periods(3);                      // others keep their exact budgets meanwhile
    checks++;
    if (!irq[2] || !status[2].blocked) fail("task 2 not kept blocked");
    kill[2] = 1'b1; repeat (2) @(posedge clk);
    #1 irq_clear[2] = 1'b1;
    @(posedge clk); #1 irq_clear[2] = 1'b0; kill[2] = 1'b0;
    checks++;
    if (irq[2]) fail("irq not cleared");
    go[2] = 1'b1; @(posedge clk); #1 go[2] = 1'b0;
    next_period();
    exact[2] = 1'b1;
    periods(3);

    // every mechanism must have happened
    checks++;
    if (n_refill == 0 || n_throttled == 0 || conflicts == 0 || n_w_held == 0 ||
        n_viol != 1 || n_clear != 1 || jobs_done[0] != 2 || n_exact_periods == 0)
      fail("a mechanism never happened");
    $display("refills=%0d throttled=%0d conflicts=%0d w_held=%0d violations=%0d clears=%0d jobs=%0d exact_periods=%0d mem reads=%0d writes=%0d",
             n_refill, n_throttled, conflicts, n_w_held, n_viol, n_clear, jobs_done[0],
             n_exact_periods, mem_reads, mem_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
