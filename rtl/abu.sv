// abu: AXI Budgeting Unit for one HW-task.
//
// The ABU sits between the AXI4 master port of a hardware accelerator and the
// AXI interconnect (slave port `s_*` faces the task, master port `m_*` faces
// the interconnect). It watches all channels in parallel and gives the system
// two kinds of isolation:
//
//  * temporal: a budget b of transactions, set back to B every P cycles
//    (abu_budget_counter). Each read or write request (AR or AW address
//    handshake) uses one unit; up to two go per cycle. When b is spent the
//    AR/AW decouplers cut valid/ready until the next refill, so the task gets
//    at most B transactions in any period whatever the other tasks do.
//  * spatial: every new AR/AW request is checked against up to 8 address
//    segments (abu_addr_checker). A request that leaves them is never passed
//    on; the ABU blocks all new requests of the task, records the address and
//    raises `irq` until the processor pulses `irq_clear`.
//
// All gating is combinational: a request that is allowed reaches the
// interconnect in the same cycle it is issued, so the ABU adds no latency.
//
// AXI rules kept on the downstream side (own design, not in the
// description): once a valid has been shown downstream it stays up until
// accepted; the ABU remembers such "open" requests and keeps their channel
// connected, and reserves a budget unit for each of them. When a read and a
// write compete for the last unit they take turns. Write data (W) is passed
// only for write bursts whose AW has been granted (counting one still
// waiting downstream), so data of a withheld write never leaves the ABU. The
// response channels R and B are wired straight through.
//
// Configuration (`cfg`: B, P, segments) arrives as plain inputs; how the
// processor writes them is left to the system. `status` shows b, whether a
// request is being held back by the budget, and the violation record.
module abu
  import abu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  abu_cfg_t    cfg,
  input  logic        irq_clear,
  // from the HW-task
  input  axi_req_t    s_req,
  output axi_resp_t   s_resp,
  // to the interconnect
  output axi_req_t    m_req,
  input  axi_resp_t   m_resp,
  // to the processor
  output logic        irq,
  output abu_status_t status
);

  // ------------------------------------------------------------- state
  logic                       ar_open_q, aw_open_q;  // offered, not yet accepted
  logic                       blocked_q;
  logic                       rr_q;                  // 0: read wins a tie
  logic signed [WCRED_W-1:0]  wcred_q;               // granted AW minus W bursts
  addr_t                      viol_addr_q;
  logic                       viol_write_q;

  // ------------------------------------------------------------- budget
  cnt_t       budget, period_cnt;
  logic       replenish;
  logic [1:0] consume;
  logic       ar_hs, aw_hs, w_last_hs;

  abu_budget_counter #(.W(CNT_W)) u_budget (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_budget (cfg.budget),
    .cfg_period (cfg.period),
    .consume    (consume),
    .budget     (budget),
    .period_cnt (period_cnt),
    .replenish  (replenish)
  );

  // ------------------------------------------------------------- addresses
  logic ar_ok, aw_ok;

  abu_addr_checker #(.NSEG(N_SEG)) u_ar_check (
    .ax (s_req.ar), .seg (cfg.seg), .ok (ar_ok), .hit ()
  );
  abu_addr_checker #(.NSEG(N_SEG)) u_aw_check (
    .ax (s_req.aw), .seg (cfg.seg), .ok (aw_ok), .hit ()
  );

  // ------------------------------------------------------------- grant
  logic ar_new, aw_new, viol_ar, viol_aw, stop;
  logic ar_cand, aw_cand, ar_grant, aw_grant, tie;
  logic ar_en, aw_en, w_en;
  cnt_t opens, avail;

  always_comb begin
    ar_new   = s_req.ar_valid && !ar_open_q;
    aw_new   = s_req.aw_valid && !aw_open_q;
    viol_ar  = ar_new && !ar_ok;
    viol_aw  = aw_new && !aw_ok;
    stop     = blocked_q || viol_ar || viol_aw;
    ar_cand  = ar_new && !stop;
    aw_cand  = aw_new && !stop;
    opens    = cnt_t'(ar_open_q) + cnt_t'(aw_open_q);
    avail    = (budget > opens) ? budget - opens : '0;
    tie      = ar_cand && aw_cand && (avail == cnt_t'(1));
    ar_grant = ar_cand && ((avail >= cnt_t'(2)) || ((avail == cnt_t'(1)) && (!aw_cand || !rr_q)));
    aw_grant = aw_cand && ((avail >= cnt_t'(2)) || ((avail == cnt_t'(1)) && (!ar_cand ||  rr_q)));
    ar_en    = ar_open_q || ar_grant;
    aw_en    = aw_open_q || aw_grant;
  end

  // W may run while a granted burst is owed data, counting an AW on offer
  // (the AW offer is rebuilt here from its sources rather than read back
  // from m_req, which also carries W)
  logic aw_offer;
  assign aw_offer = s_req.aw_valid && aw_en;
  assign w_en     = (wcred_q + WCRED_W'(signed'({1'b0, aw_offer}))) > 0;

  // ------------------------------------------------------------- decouplers
  abu_decoupler #(.T(ax_chan_t)) u_ar_dec (
    .enable (ar_en),
    .s_valid(s_req.ar_valid), .s_ready(s_resp.ar_ready), .s_data(s_req.ar),
    .m_valid(m_req.ar_valid), .m_ready(m_resp.ar_ready), .m_data(m_req.ar)
  );
  abu_decoupler #(.T(ax_chan_t)) u_aw_dec (
    .enable (aw_en),
    .s_valid(s_req.aw_valid), .s_ready(s_resp.aw_ready), .s_data(s_req.aw),
    .m_valid(m_req.aw_valid), .m_ready(m_resp.aw_ready), .m_data(m_req.aw)
  );
  abu_decoupler #(.T(w_chan_t)) u_w_dec (
    .enable (w_en),
    .s_valid(s_req.w_valid), .s_ready(s_resp.w_ready), .s_data(s_req.w),
    .m_valid(m_req.w_valid), .m_ready(m_resp.w_ready), .m_data(m_req.w)
  );

  // responses pass straight back
  assign m_req.r_ready  = s_req.r_ready;
  assign m_req.b_ready  = s_req.b_ready;
  assign s_resp.r       = m_resp.r;
  assign s_resp.r_valid = m_resp.r_valid;
  assign s_resp.b       = m_resp.b;
  assign s_resp.b_valid = m_resp.b_valid;

  // ------------------------------------------------------------- counting
  assign ar_hs     = m_req.ar_valid && m_resp.ar_ready;
  assign aw_hs     = m_req.aw_valid && m_resp.aw_ready;
  assign w_last_hs = m_req.w_valid && m_resp.w_ready && m_req.w.last;
  assign consume   = 2'(ar_hs) + 2'(aw_hs);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ar_open_q    <= 1'b0;
      aw_open_q    <= 1'b0;
      blocked_q    <= 1'b0;
      rr_q         <= 1'b0;
      wcred_q      <= '0;
      viol_addr_q  <= '0;
      viol_write_q <= 1'b0;
    end else begin
      ar_open_q <= m_req.ar_valid && !m_resp.ar_ready;
      aw_open_q <= m_req.aw_valid && !m_resp.aw_ready;
      if (tie) rr_q <= !rr_q;
      wcred_q <= wcred_q + WCRED_W'(signed'({1'b0, aw_hs}))
                         - WCRED_W'(signed'({1'b0, w_last_hs}));
      if ((viol_ar || viol_aw) && !blocked_q) begin
        blocked_q    <= 1'b1;
        viol_addr_q  <= viol_ar ? s_req.ar.addr : s_req.aw.addr;
        viol_write_q <= !viol_ar;
      end else if (irq_clear) begin
        blocked_q <= 1'b0;
      end
    end
  end

  assign irq                = blocked_q;
  assign status.budget_left = budget;
  assign status.period_pos  = period_cnt;
  assign status.period_end  = replenish;
  assign status.throttled   = (ar_cand && !ar_grant) || (aw_cand && !aw_grant);
  assign status.blocked     = blocked_q;
  assign status.viol_addr   = viol_addr_q;
  assign status.viol_write  = viol_write_q;

  // ------------------------------------------------------------- AXI rules
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.ar_valid && !m_resp.ar_ready |=> m_req.ar_valid);
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.aw_valid && !m_resp.aw_ready |=> m_req.aw_valid);
  a_no_grant_blocked: assert property (@(posedge clk) disable iff (!rst_n)
    !(blocked_q && (ar_grant || aw_grant)));

endmodule
