// axi_sink_model: behavioural in-order AXI4 memory sink (not RTL).
//
// Stands in for the FPGA-to-PS port and the DRAM behind it. It accepts at
// most one read and one write request per cycle (its supply), answers reads
// in order, LAT cycles after acceptance, one R beat per cycle, and answers
// each write with a B once its last W beat has arrived. Data is not stored:
// the ABU tests only look at who gets access and when.
module axi_sink_model
  import abu_pkg::*;
#(
  parameter int unsigned LAT   = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axi_req_t  req,
  output axi_resp_t resp,
  output int unsigned reads,
  output int unsigned writes
);

  typedef struct { int unsigned len; logic [ID_W-1:0] id; int unsigned t; } rd_t;

  rd_t              rq[$];
  logic [ID_W-1:0]  bq[$];
  int unsigned      beat, cyc, wdone;

  always_comb begin
    resp          = '0;
    resp.ar_ready = rq.size() < DEPTH;
    resp.aw_ready = bq.size() < DEPTH;
    resp.w_ready  = 1'b1;
    if (rq.size() > 0 && rq[0].t <= cyc) begin
      resp.r_valid = 1'b1;
      resp.r.id    = rq[0].id;
      resp.r.data  = {32'(cyc), 32'(beat)};
      resp.r.resp  = 2'b00;
      resp.r.last  = (beat == rq[0].len);
    end
    if (bq.size() > 0 && wdone > 0) begin
      resp.b_valid = 1'b1;
      resp.b.id    = bq[0];
      resp.b.resp  = 2'b00;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rq.delete(); bq.delete();
      beat <= 0; cyc <= 0; wdone <= 0; reads <= 0; writes <= 0;
    end else begin
      int unsigned wd;
      cyc <= cyc + 1;
      wd = wdone;
      if (resp.r_valid && req.r_ready) begin
        if (resp.r.last) begin
          void'(rq.pop_front());
          beat <= 0;
        end else beat <= beat + 1;
      end
      if (resp.b_valid && req.b_ready) begin
        void'(bq.pop_front());
        wd--;
      end
      if (req.w_valid && resp.w_ready && req.w.last) wd++;
      wdone <= wd;
      if (req.ar_valid && resp.ar_ready) begin
        rd_t r;
        r.len = int'(req.ar.len);
        r.id  = req.ar.id;
        r.t   = cyc + LAT;
        rq.push_back(r);
        reads <= reads + 1;
      end
      if (req.aw_valid && resp.aw_ready) begin
        bq.push_back(req.aw.id);
        writes <= writes + 1;
      end
    end
  end

endmodule
