// tb_abu_case_study: the four-task budget configuration of the case study.
//
// Four HW-tasks (two DMA engines, a Sobel filter and a FIR filter, all
// modelled as DMA-like tasks that ask for as much bandwidth as they can get)
// share one in-order memory through their ABUs and a round-robin
// interconnect. Budgets are those of the evaluated configuration: DMA-1
// B = 128, DMA-2 B = 144, Sobel B = 112, FIR B = 96.
//
// The period used with these budgets is not given, so two are tried:
//   * P = 1024 cycles: the memory model (one read and one write request per
//     cycle, one data beat per cycle each way) can serve all 480 budgeted
//     transactions in a period, so every ABU must pass exactly its B in every
//     period - the reservation holds;
//   * P = 128 cycles: 480 transactions cannot fit into 128 cycles, so the
//     budgets cannot all be used up; the ABUs must still never pass more than
//     B, and at least one task must fall short. This is the case the
//     schedulability check on the system side exists to catch.
module tb_abu_case_study;
  import abu_pkg::*;

  localparam int unsigned N = 4;

  logic                  clk = 1'b0, rst_n = 1'b0;
  abu_cfg_t    [N-1:0]   cfg;
  logic        [N-1:0]   irq_clear, irq;
  axi_req_t    [N-1:0]   task_req, ic_req;
  axi_resp_t   [N-1:0]   task_resp, ic_resp;
  abu_status_t [N-1:0]   status;
  axi_req_t              mem_req;
  axi_resp_t             mem_resp;
  int unsigned           conflicts, mem_reads, mem_writes;
  logic        [N-1:0]   go, busy;
  int unsigned           job_len [N];
  int unsigned           resp_time [N];
  int unsigned           jobs_done [N];

  int checks = 0, failures = 0;

  function automatic addr_t win(input int i);
    return 32'h2000_0000 + addr_t'(i) * 32'h0010_0000;
  endfunction

  abu_system dut (
    .clk, .rst_n, .cfg, .irq_clear, .task_req, .task_resp, .ic_req, .ic_resp,
    .irq, .status
  );
  axi_rr_interconnect_model #(.N(N)) u_ic (
    .clk, .rst_n, .s_req(ic_req), .s_resp(ic_resp), .m_req(mem_req),
    .m_resp(mem_resp), .conflicts
  );
  axi_sink_model #(.DEPTH(32)) u_mem (
    .clk, .rst_n, .req(mem_req), .resp(mem_resp), .reads(mem_reads), .writes(mem_writes)
  );
  for (genvar i = 0; i < N; i++) begin : g_task
    hw_task_model u_task (
      .clk, .rst_n, .go(go[i]), .job_len(job_len[i]), .base(win(i)), .bad(1'b0),
      .bad_addr('0), .kill(1'b0), .req(task_req[i]), .resp(task_resp[i]),
      .busy(busy[i]), .resp_time(resp_time[i]), .jobs_done(jobs_done[i])
    );
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 30) $display("FAIL @%0t %s", $time, msg);
  endtask

  int unsigned cyc = 0, period = 1024, judged = 0, short_periods = 0, exact_periods = 0;
  int unsigned cnt [N];
  bit          expect_exact = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc = 0;
      foreach (cnt[i]) cnt[i] = 0;
    end else begin
      for (int i = 0; i < N; i++)
        cnt[i] += int'(ic_req[i].ar_valid && ic_resp[i].ar_ready)
                + int'(ic_req[i].aw_valid && ic_resp[i].aw_ready);
      if (cyc % period == period - 1) begin
        bit short_one;
        short_one = 1'b0;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (cnt[i] > int'(cfg[i].budget))
            fail($sformatf("ABU %0d passed %0d > B=%0d", i, cnt[i], cfg[i].budget));
          if (cnt[i] < int'(cfg[i].budget)) short_one = 1'b1;
          if (judged > 0 && expect_exact) begin
            checks++;
            if (cnt[i] != int'(cfg[i].budget))
              fail($sformatf("ABU %0d passed %0d, B=%0d (P=%0d)", i, cnt[i],
                             cfg[i].budget, period));
          end
          cnt[i] = 0;
        end
        if (judged > 0) begin
          if (short_one) short_periods++;
          else exact_periods++;
        end
        judged++;
      end
      cyc++;
    end
  end

  task automatic run(input int unsigned p, input int n_periods, input bit exact);
    automatic int unsigned b [N] = '{128, 144, 112, 96};   // DMA-1, DMA-2, Sobel, FIR
    @(posedge clk);
    #1 rst_n = 1'b0;
    period = p; judged = 0; short_periods = 0; exact_periods = 0;
    expect_exact = exact;
    for (int i = 0; i < N; i++) begin
      cfg[i].budget      = cnt_t'(b[i]);
      cfg[i].period      = cnt_t'(p);
      cfg[i].seg[1].base = win(i);
      cfg[i].seg[1].size = 32'h0010_0000;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    go = '1; @(posedge clk); #1 go = '0;
    repeat (n_periods * p) @(posedge clk);
    #1;
  endtask

  initial begin
    cfg = '0; irq_clear = '0; go = '0;
    foreach (job_len[i]) job_len[i] = 0;

    run(1024, 8, 1'b1);
    checks++;
    if (exact_periods < 6) fail($sformatf("only %0d periods met every budget", exact_periods));
    $display("P=1024: %0d periods with every budget met, %0d short", exact_periods, short_periods);

    run(128, 20, 1'b0);
    checks++;
    if (short_periods == 0) fail("overloaded memory still served every budget");
    $display("P=128: %0d periods short of some budget, %0d met all", short_periods, exact_periods);
    $display("memory served reads=%0d writes=%0d, arbitration conflicts=%0d",
             mem_reads, mem_writes, conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
