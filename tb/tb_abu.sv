// tb_abu: self-checking test of one AXI Budgeting Unit.
//
// A HW-task model drives AR and AW requests (holding each valid until it is
// accepted, as AXI requires) and the W bursts that belong to its writes,
// sometimes ahead of their AW. A slave model on the other side accepts with
// random or fixed readiness and drives random R and B responses. The test
// keeps its own count of cycles since reset and of address handshakes that
// reach the slave, and checks:
//   * per period of P cycles, no more than B requests reach the slave; with a
//     greedy task and a ready slave exactly min(B, 2P) do,
//   * the budget shown in `status` equals B minus the requests of this period,
//   * an allowed request reaches the slave in the cycle it is issued (no added
//     latency), and what reaches the slave is what the task sent,
//   * W bursts never run ahead of the AWs granted (or on offer),
//   * R and B pass back unchanged,
//   * a request outside the segments never reaches the slave, raises irq with
//     the right address, blocks later requests, and irq_clear releases it,
//   * read and write take turns when they compete for the last unit.
// The ABU's own assertions check that a valid shown downstream is held.
module tb_abu;
  import abu_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  abu_cfg_t    cfg;
  logic        irq_clear;
  axi_req_t    s_req, m_req;
  axi_resp_t   s_resp, m_resp;
  logic        irq;
  abu_status_t status;

  int checks = 0, failures = 0;

  abu dut (.clk, .rst_n, .cfg, .irq_clear, .s_req, .s_resp, .m_req, .m_resp,
           .irq, .status);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t %s", $time, msg);
  endtask

  // ------------------------------------------------------------ knobs
  int  rd_rate = 100, wr_rate = 100;      // % chance of a new request
  int  ar_rdy = 100, aw_rdy = 100, w_rdy = 100;  // % slave readiness
  bit  bad_next_ar = 0;                   // next AR goes outside the segments
  bit  task_reset = 0;                    // HW-task held in reset (drops requests)
  bit  greedy_check = 0;                  // expect exactly min(B, 2P) per period

  localparam addr_t SEG0 = 32'h1000_0000, SEG1 = 32'h2000_0000;
  localparam addr_t BAD  = 32'h0000_4000;  // e.g. kernel memory

  function automatic ax_chan_t new_ax(input bit bad);
    ax_chan_t a;
    a.id    = ID_W'($urandom());
    a.len   = 8'($urandom_range(0, 7));
    a.size  = 3'd3;
    a.burst = 2'b01;
    a.cache = 4'h3;
    a.prot  = 3'h0;
    a.addr  = (($urandom_range(0, 1) != 0) ? SEG0 : SEG1) + addr_t'($urandom_range(0, 31) * 64);
    if (bad) a.addr = BAD;
    return a;
  endfunction

  // ------------------------------------------------------------ HW-task model
  int unsigned wq[$];      // beats of W bursts still to send
  int unsigned wbeat;      // beats sent of the head burst

  always @(posedge clk) begin
    if (!rst_n || task_reset) begin
      s_req.ar_valid <= 1'b0;
      s_req.aw_valid <= 1'b0;
      s_req.w_valid  <= 1'b0;
      s_req.ar <= '0; s_req.aw <= '0; s_req.w <= '0;
      wq.delete();
      wbeat <= 0;
    end else begin
      // AR
      if (!s_req.ar_valid || s_resp.ar_ready) begin
        s_req.ar_valid <= 1'b0;
        if (bad_next_ar) begin
          s_req.ar_valid <= 1'b1;
          s_req.ar       <= new_ax(1'b1);
          bad_next_ar    <= 1'b0;
        end else if ($urandom_range(1, 100) <= rd_rate) begin
          s_req.ar_valid <= 1'b1;
          s_req.ar       <= new_ax(1'b0);
        end
      end
      // AW: its W burst is queued when the AW is first offered
      if (!s_req.aw_valid || s_resp.aw_ready) begin
        s_req.aw_valid <= 1'b0;
        if ($urandom_range(1, 100) <= wr_rate && wq.size() < 4) begin
          ax_chan_t a;
          a = new_ax(1'b0);
          s_req.aw_valid <= 1'b1;
          s_req.aw       <= a;
          wq.push_back(int'(a.len) + 1);
        end
      end
      // W
      if (!s_req.w_valid || s_resp.w_ready) begin
        int unsigned nb;
        nb = wbeat;
        if (s_req.w_valid) begin
          nb = wbeat + 1;
          if (s_req.w.last) begin
            void'(wq.pop_front());
            nb = 0;
          end
        end
        wbeat <= nb;
        s_req.w_valid <= 1'b0;
        if (wq.size() > 0 && $urandom_range(0, 3) != 0) begin
          s_req.w_valid   <= 1'b1;
          s_req.w.data    <= {$urandom(), $urandom()};
          s_req.w.strb    <= '1;
          s_req.w.last    <= (nb + 1 == wq[0]);
        end
      end
    end
  end

  assign s_req.r_ready = 1'($urandom());
  assign s_req.b_ready = 1'($urandom());

  // ------------------------------------------------------------ slave model
  always_ff @(posedge clk) begin
    m_resp.ar_ready <= ($urandom_range(1, 100) <= ar_rdy);
    m_resp.aw_ready <= ($urandom_range(1, 100) <= aw_rdy);
    m_resp.w_ready  <= ($urandom_range(1, 100) <= w_rdy);
    m_resp.r        <= r_chan_t'({$urandom(), $urandom(), $urandom()});
    m_resp.r_valid  <= 1'($urandom());
    m_resp.b        <= b_chan_t'($urandom());
    m_resp.b_valid  <= 1'($urandom());
  end

  // ------------------------------------------------------------ scoreboard
  int unsigned cyc = 0, in_period = 0, period_len;
  int unsigned aw_granted = 0, w_bursts = 0;
  int unsigned n_ar = 0, n_aw = 0, n_refill = 0, n_throttled = 0, n_tie_ar = 0,
               n_tie_aw = 0, n_w_held = 0, n_open_hold = 0, n_same_cycle = 0;
  bit          ar_seen_prev = 0, aw_seen_prev = 0, ar_open_prev;

  always @(posedge clk) begin
    if (rst_n) begin
      bit ar_hs, aw_hs;
      period_len = (cfg.period == 0) ? 1 : int'(cfg.period);
      ar_hs = m_req.ar_valid && m_resp.ar_ready;
      aw_hs = m_req.aw_valid && m_resp.aw_ready;
      // budget as the test counts it
      checks++;
      if (int'(status.budget_left) != ((int'(cfg.budget) > int'(in_period)) ?
                                       int'(cfg.budget) - int'(in_period) : 0))
        fail($sformatf("budget shows %0d, expected %0d", status.budget_left,
                       int'(cfg.budget) - int'(in_period)));
      // what reaches the slave is what the task sent, same cycle
      checks++;
      if ((m_req.ar_valid && (!s_req.ar_valid || m_req.ar != s_req.ar)) ||
          (m_req.aw_valid && (!s_req.aw_valid || m_req.aw != s_req.aw)) ||
          (m_req.w_valid  && (!s_req.w_valid  || m_req.w  != s_req.w))  ||
          (s_resp.ar_ready && !m_resp.ar_ready) || (s_resp.aw_ready && !m_resp.aw_ready))
        fail("downstream request differs from upstream");
      // no added latency: with budget to spare a new request passes at once
      if (!irq && s_req.ar_valid && !s_req.aw_valid && status.budget_left >= 2 &&
          m_req.ar.addr != BAD) begin
        checks++;
        n_same_cycle++;
        if (!m_req.ar_valid) fail("allowed AR not passed in the same cycle");
      end
      // requests outside the segments never reach the slave
      checks++;
      if ((m_req.ar_valid && m_req.ar.addr == BAD) || (m_req.aw_valid && m_req.aw.addr == BAD))
        fail("request outside the segments reached the slave");
      // responses pass back unchanged
      checks++;
      if (s_resp.r != m_resp.r || s_resp.r_valid != m_resp.r_valid ||
          s_resp.b != m_resp.b || s_resp.b_valid != m_resp.b_valid ||
          m_req.r_ready != s_req.r_ready || m_req.b_ready != s_req.b_ready)
        fail("response channel changed");
      // W never ahead of granted AW (or one on offer)
      if (m_req.w_valid && m_resp.w_ready && m_req.w.last) w_bursts++;
      if (aw_hs) aw_granted++;
      checks++;
      if (w_bursts > aw_granted + (m_req.aw_valid && !aw_hs ? 1 : 0))
        fail($sformatf("W bursts %0d ahead of AW %0d", w_bursts, aw_granted));
      // mechanisms
      if (s_req.w_valid && !m_req.w_valid) n_w_held++;
      if (status.throttled) n_throttled++;
      // an offered read kept on while the budget holds other requests back
      if (m_req.ar_valid && ar_seen_prev && status.throttled)
        n_open_hold++;
      ar_open_prev = ar_seen_prev;
      ar_seen_prev = m_req.ar_valid && !m_resp.ar_ready;
      if (s_req.ar_valid && s_req.aw_valid && !ar_open_prev && !aw_seen_prev &&
          status.budget_left == 1 && !irq) begin
        if (m_req.ar_valid && !m_req.aw_valid) n_tie_ar++;
        if (m_req.aw_valid && !m_req.ar_valid) n_tie_aw++;
      end
      aw_seen_prev = m_req.aw_valid && !m_resp.aw_ready;
      n_ar += ar_hs; n_aw += aw_hs;
      in_period += int'(ar_hs) + int'(aw_hs);
      // end of period
      if ((cyc % period_len) == period_len - 1) begin
        checks++;
        if (in_period > cfg.budget)
          fail($sformatf("%0d requests in a period, budget %0d", in_period, cfg.budget));
        if (greedy_check) begin
          int unsigned exp;
          exp = (int'(cfg.budget) < 2 * period_len) ? int'(cfg.budget) : 2 * period_len;
          checks++;
          if (in_period != exp)
            fail($sformatf("greedy task got %0d requests, expected %0d", in_period, exp));
        end
        if (!status.period_end) fail("period end not flagged");
        in_period = 0;
        n_refill++;
      end
      cyc++;
    end else begin
      cyc = 0; in_period = 0; aw_granted = 0; w_bursts = 0;
    end
  end

  task automatic restart(input int unsigned b, input int unsigned p);
    @(posedge clk);
    #1 rst_n = 1'b0;
    task_reset = 1'b1;
    cfg.budget = cnt_t'(b);
    cfg.period = cnt_t'(p);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    task_reset = 1'b0;
  endtask

  initial begin
    cfg = '0;
    cfg.seg[0].base = SEG0; cfg.seg[0].size = 32'h0001_0000;
    cfg.seg[5].base = SEG1; cfg.seg[5].size = 32'h0000_1000;
    irq_clear = 1'b0;
    s_req = '0;

    // 1. greedy task, ready slave: exactly B per period
    restart(10, 32);
    greedy_check = 1;
    repeat (32 * 20) @(posedge clk);
    // 2. the evaluated budget/period pair: more than one request per cycle
    restart(144, 128);
    repeat (128 * 6) @(posedge clk);
    greedy_check = 0;
    // 3. random traffic and random slave readiness
    restart(12, 40);
    rd_rate = 40; wr_rate = 40; ar_rdy = 50; aw_rdy = 50; w_rdy = 60;
    repeat (40 * 60) @(posedge clk);
    // 4. last unit shared: read and write take turns
    restart(1, 4);
    rd_rate = 100; wr_rate = 100; ar_rdy = 100; aw_rdy = 100; w_rdy = 100;
    repeat (400) @(posedge clk);
    // 5. a slow slave while the budget runs out: offered requests are held
    restart(6, 30);
    ar_rdy = 10; aw_rdy = 10; w_rdy = 30;
    repeat (30 * 30) @(posedge clk);
    ar_rdy = 100; aw_rdy = 100; w_rdy = 100;
    // 6. address violation
    restart(50, 20);
    rd_rate = 30; wr_rate = 30;
    repeat (50) @(posedge clk);
    #1 bad_next_ar = 1'b1;
    wait (irq === 1'b1);
    @(posedge clk); #1;
    checks++;
    if (status.viol_addr != BAD || status.viol_write != 1'b0 || !status.blocked)
      fail("violation record wrong");
    begin : blocked_phase
      int unsigned n0;
      n0 = n_ar + n_aw;
      repeat (20) @(posedge clk);
      #1;
      checks++;
      // at most the requests already on offer when the block came may finish
      if (n_ar + n_aw > n0 + 2) fail("requests granted while blocked");
      checks++;
      if (!irq) fail("irq dropped without clear");
    end
    task_reset = 1'b1;               // processor resets the task ...
    repeat (2) @(posedge clk);
    #1 irq_clear = 1'b1;             // ... and clears the interrupt
    @(posedge clk);
    #1 irq_clear = 1'b0; task_reset = 1'b0;
    begin : resumed
      int unsigned n0;
      n0 = n_ar + n_aw;
      repeat (100) @(posedge clk);
      #1;
      checks++;
      if (irq || n_ar + n_aw == n0) fail("traffic did not resume after irq_clear");
    end

    // every mechanism must have happened
    checks++;
    if (n_refill == 0 || n_throttled == 0 || n_tie_ar == 0 || n_tie_aw == 0 ||
        n_w_held == 0 || n_open_hold == 0 || n_same_cycle == 0) begin
      fail($sformatf("mechanism missing: refill=%0d throttled=%0d tie_ar=%0d tie_aw=%0d w_held=%0d open_hold=%0d same_cycle=%0d",
                     n_refill, n_throttled, n_tie_ar, n_tie_aw, n_w_held, n_open_hold, n_same_cycle));
    end
    $display("refills=%0d throttled=%0d ties ar/aw=%0d/%0d w_held=%0d open_hold=%0d same_cycle=%0d reads=%0d writes=%0d",
             n_refill, n_throttled, n_tie_ar, n_tie_aw, n_w_held, n_open_hold, n_same_cycle, n_ar, n_aw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
