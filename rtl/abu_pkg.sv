// abu_pkg: types and constants shared by the AXI Budgeting Unit (ABU) blocks.
//
// The ABU sits on the AXI4 master port of one hardware task (HW-task) and
// regulates it in time (a transaction budget that is refilled every period)
// and in space (a list of address segments the task may touch). This package
// holds the AXI4 channel payloads, the request/response bundles that carry a
// whole AXI4 link as two structs, and the per-ABU configuration and status
// records.
//
// From the design description: up to 8 address segments, each a base and a
// size; a budget B and a replenishment period P per ABU. Own choices: the AXI
// widths (32-bit address, 64-bit data and 6-bit IDs, as on the high
// performance ports of a Zynq-7000), 16-bit budget and period registers, and
// the encoding of a segment as [base, base+size-1] with size 0 meaning unused.
package abu_pkg;

  // ---------------------------------------------------------------- AXI4 link
  parameter int unsigned ADDR_W = 32;
  parameter int unsigned DATA_W = 64;
  parameter int unsigned ID_W   = 6;
  parameter int unsigned STRB_W = DATA_W / 8;

  typedef logic [ADDR_W-1:0] addr_t;

  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10
  } burst_e;

  // AW and AR payload (same fields in AXI4)
  typedef struct packed {
    logic [ID_W-1:0] id;
    addr_t           addr;
    logic [7:0]      len;    // beats - 1
    logic [2:0]      size;   // log2(bytes per beat)
    logic [1:0]      burst;  // burst_e
    logic [3:0]      cache;
    logic [2:0]      prot;
  } ax_chan_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [STRB_W-1:0] strb;
    logic              last;
  } w_chan_t;

  typedef struct packed {
    logic [ID_W-1:0] id;
    logic [1:0]      resp;
  } b_chan_t;

  typedef struct packed {
    logic [ID_W-1:0]   id;
    logic [DATA_W-1:0] data;
    logic [1:0]        resp;
    logic              last;
  } r_chan_t;

  // Everything a master drives
  typedef struct packed {
    ax_chan_t aw;
    logic     aw_valid;
    w_chan_t  w;
    logic     w_valid;
    logic     b_ready;
    ax_chan_t ar;
    logic     ar_valid;
    logic     r_ready;
  } axi_req_t;

  // Everything a slave drives
  typedef struct packed {
    logic    aw_ready;
    logic    w_ready;
    b_chan_t b;
    logic    b_valid;
    logic    ar_ready;
    r_chan_t r;
    logic    r_valid;
  } axi_resp_t;

  // ------------------------------------------------------------ ABU settings
  parameter int unsigned N_SEG   = 8;    // address segments per ABU
  parameter int unsigned CNT_W   = 16;   // width of budget and period
  parameter int unsigned WCRED_W = 8;    // write bursts granted ahead of W data

  typedef logic [CNT_W-1:0] cnt_t;

  // A segment covers bytes [base, base + size - 1]; size 0 disables it.
  typedef struct packed {
    addr_t base;
    addr_t size;
  } segment_t;

  typedef struct packed {
    cnt_t                     budget;  // B: transactions allowed per period
    cnt_t                     period;  // P: clock cycles per period
    segment_t [N_SEG-1:0]     seg;
  } abu_cfg_t;

  typedef struct packed {
    cnt_t  budget_left;  // b: what is left of this period's budget
    cnt_t  period_pos;   // cycle inside the current period, 0 .. P-1
    logic  period_end;   // last cycle of the period: b is refilled next
    logic  throttled;    // a request waits because the budget is spent
    logic  blocked;      // an address violation stopped the HW-task
    addr_t viol_addr;    // address of the offending request
    logic  viol_write;   // 1: it was a write (AW), 0: a read (AR)
  } abu_status_t;

endpackage
