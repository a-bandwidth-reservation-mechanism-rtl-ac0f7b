// axi_rr_interconnect_model: behavioural N-to-1 AXI4 interconnect (not RTL).
//
// Stands in for the stock AXI interconnect of the FPGA vendor, which does
// round-robin arbitration. AR and AW are each arbitrated round robin among
// the masters that request; a choice is kept until the slave accepts it, so
// downstream valids are stable. The slave is assumed to answer in order, so
// the master of every accepted read and write is queued and R bursts, W
// bursts and B responses are steered by the head of their queue. No ID
// remapping is needed for that reason. `conflicts` counts cycles in which
// more than one master asked for the same address channel.
module axi_rr_interconnect_model
  import abu_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  axi_req_t  [N-1:0]   s_req,
  output axi_resp_t [N-1:0]   s_resp,
  output axi_req_t            m_req,
  input  axi_resp_t           m_resp,
  output int unsigned         conflicts
);

  localparam int unsigned QD = 64;

  int unsigned rq[$], wq[$], bq[$];
  int unsigned ar_ptr, aw_ptr, ar_sel_q, aw_sel_q;
  logic        ar_lock_q, aw_lock_q;
  int unsigned ar_sel, aw_sel;
  logic        ar_any, aw_any;

  function automatic int unsigned pick(input int unsigned ptr, input logic [N-1:0] v);
    for (int unsigned k = 0; k < N; k++)
      if (v[(ptr + k) % N]) return (ptr + k) % N;
    return 0;
  endfunction

  always_comb begin
    logic [N-1:0] arv, awv;
    for (int i = 0; i < N; i++) begin
      arv[i] = s_req[i].ar_valid;
      awv[i] = s_req[i].aw_valid;
    end
    ar_any = (arv != '0) && rq.size() < QD;
    aw_any = (awv != '0) && wq.size() < QD;
    ar_sel = ar_lock_q ? ar_sel_q : pick(ar_ptr, arv);
    aw_sel = aw_lock_q ? aw_sel_q : pick(aw_ptr, awv);

    m_req          = '0;
    m_req.ar       = s_req[ar_sel].ar;
    m_req.ar_valid = ar_any && s_req[ar_sel].ar_valid;
    m_req.aw       = s_req[aw_sel].aw;
    m_req.aw_valid = aw_any && s_req[aw_sel].aw_valid;
    if (wq.size() > 0) begin
      m_req.w       = s_req[wq[0]].w;
      m_req.w_valid = s_req[wq[0]].w_valid;
    end
    m_req.r_ready = (rq.size() > 0) ? s_req[rq[0]].r_ready : 1'b0;
    m_req.b_ready = (bq.size() > 0) ? s_req[bq[0]].b_ready : 1'b0;

    for (int i = 0; i < N; i++) begin
      s_resp[i]          = '0;
      s_resp[i].ar_ready = (ar_sel == i) && ar_any && m_resp.ar_ready;
      s_resp[i].aw_ready = (aw_sel == i) && aw_any && m_resp.aw_ready;
      s_resp[i].w_ready  = (wq.size() > 0) && (wq[0] == i) && m_resp.w_ready;
      s_resp[i].r        = m_resp.r;
      s_resp[i].r_valid  = (rq.size() > 0) && (rq[0] == i) && m_resp.r_valid;
      s_resp[i].b        = m_resp.b;
      s_resp[i].b_valid  = (bq.size() > 0) && (bq[0] == i) && m_resp.b_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rq.delete(); wq.delete(); bq.delete();
      ar_ptr <= 0; aw_ptr <= 0; ar_sel_q <= 0; aw_sel_q <= 0;
      ar_lock_q <= 1'b0; aw_lock_q <= 1'b0;
      conflicts <= 0;
    end else begin
      int n_ar, n_aw;
      n_ar = 0; n_aw = 0;
      for (int i = 0; i < N; i++) begin
        n_ar += int'(s_req[i].ar_valid);
        n_aw += int'(s_req[i].aw_valid);
      end
      if (n_ar > 1 || n_aw > 1) conflicts <= conflicts + 1;
      // responses first (they use the queue heads of this cycle)
      if (m_resp.r_valid && m_req.r_ready && m_resp.r.last) void'(rq.pop_front());
      if (m_resp.b_valid && m_req.b_ready) void'(bq.pop_front());
      if (m_req.w_valid && m_resp.w_ready && m_req.w.last) void'(wq.pop_front());
      if (m_req.ar_valid && m_resp.ar_ready) begin
        rq.push_back(ar_sel);
        ar_ptr    <= (ar_sel + 1) % N;
        ar_lock_q <= 1'b0;
      end else begin
        ar_lock_q <= m_req.ar_valid;
        ar_sel_q  <= ar_sel;
      end
      if (m_req.aw_valid && m_resp.aw_ready) begin
        wq.push_back(aw_sel);
        bq.push_back(aw_sel);
        aw_ptr    <= (aw_sel + 1) % N;
        aw_lock_q <= 1'b0;
      end else begin
        aw_lock_q <= m_req.aw_valid;
        aw_sel_q  <= aw_sel;
      end
    end
  end

endmodule
