// hw_task_model: behavioural DMA-like HW-task for system tests (not RTL).
//
// On a `go` pulse the task starts a job of `job_len` transactions, issuing
// read (AR) and write (AW + W burst) requests as fast as the link accepts
// them, one of each per cycle at most, inside the address window
// [base, base + 64 KiB). `job_len` = 0 means a job that never ends (a task
// that keeps asking for bandwidth). The job is done when every response (R
// last and B) has come back; `resp_time` then holds the cycles from `go` to
// the last response. A pulse on `bad` makes the next read go to `bad_addr`.
// `kill` models the processor stopping the task after a violation: the job
// is abandoned, the refused request outside the window is withdrawn (it never
// reached the interconnect), and no new request is started; requests already
// offered are still held until accepted and owed write data is still sent.
// Otherwise valids are held until accepted, as AXI requires.
module hw_task_model
  import abu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        go,
  input  int unsigned job_len,
  input  addr_t       base,
  input  logic        bad,
  input  addr_t       bad_addr,
  input  logic        kill,
  output axi_req_t    req,
  input  axi_resp_t   resp,
  output logic        busy,
  output int unsigned resp_time,
  output int unsigned jobs_done
);

  int unsigned issued, answered, started, cyc, t0;
  int unsigned wq[$];
  int unsigned wbeat;
  logic        bad_pending;

  function automatic ax_chan_t mk(input addr_t a);
    ax_chan_t x;
    x.id    = ID_W'($urandom());
    x.addr  = a;
    x.len   = 8'($urandom_range(0, 1));
    x.size  = 3'd3;
    x.burst = 2'b01;
    x.cache = 4'h3;
    x.prot  = 3'h0;
    return x;
  endfunction

  assign req.r_ready = 1'b1;
  assign req.b_ready = 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      req.ar_valid <= 1'b0; req.aw_valid <= 1'b0; req.w_valid <= 1'b0;
      req.ar <= '0; req.aw <= '0; req.w <= '0;
      wq.delete();
      wbeat <= 0; issued <= 0; answered <= 0; busy <= 1'b0;
      bad_pending <= 1'b0; started <= 0;
      jobs_done <= 0; resp_time <= 0; cyc <= 0;
    end else begin
      int unsigned iss, ans, st;
      logic        act;
      cyc <= cyc + 1;
      iss = issued + int'(req.ar_valid && resp.ar_ready) + int'(req.aw_valid && resp.aw_ready);
      ans = answered + int'(resp.r_valid && resp.r.last) + int'(resp.b_valid);
      if (bad) bad_pending <= 1'b1;
      if (go) begin
        busy <= 1'b1; t0 <= cyc; iss = 0; ans = 0;
      end
      st  = go ? 0 : started;
      act = (busy || go) && !kill;
      issued   <= iss;
      answered <= ans;
      // AR
      if (!req.ar_valid || resp.ar_ready) begin
        req.ar_valid <= 1'b0;
        if ((bad_pending || bad) && !kill) begin
          req.ar_valid <= 1'b1;
          req.ar       <= mk(bad_addr);
          bad_pending  <= 1'b0;
        end else if (act && (job_len == 0 || st < job_len)) begin
          req.ar_valid <= 1'b1;
          req.ar       <= mk(base + addr_t'($urandom_range(0, 1023) * 64));
          st++;
        end
      end
      // AW with its W burst queued
      if (!req.aw_valid || resp.aw_ready) begin
        req.aw_valid <= 1'b0;
        if (act && wq.size() < 4 && (job_len == 0 || st < job_len)) begin
          ax_chan_t a;
          a = mk(base + addr_t'($urandom_range(0, 1023) * 64));
          req.aw_valid <= 1'b1;
          req.aw       <= a;
          wq.push_back(int'(a.len) + 1);
          st++;
        end
      end
      started <= (job_len == 0) ? 0 : st;
      // W
      if (!req.w_valid || resp.w_ready) begin
        int unsigned nb;
        nb = wbeat;
        if (req.w_valid) begin
          nb = wbeat + 1;
          if (req.w.last) begin
            void'(wq.pop_front());
            nb = 0;
          end
        end
        wbeat <= nb;
        req.w_valid <= 1'b0;
        if (wq.size() > 0) begin
          req.w_valid <= 1'b1;
          req.w.data  <= {$urandom(), $urandom()};
          req.w.strb  <= '1;
          req.w.last  <= (nb + 1 == wq[0]);
        end
      end
      // job end: everything issued and answered
      if (busy && !go && job_len != 0 && iss >= job_len && ans >= iss) begin
        busy      <= 1'b0;
        jobs_done <= jobs_done + 1;
        resp_time <= cyc + 1 - t0;
      end
      if (kill) begin
        busy        <= 1'b0;
        bad_pending <= 1'b0;
        if (req.ar_valid && req.ar.addr == bad_addr) req.ar_valid <= 1'b0;
      end
    end
  end

endmodule
