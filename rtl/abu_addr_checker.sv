// abu_addr_checker: spatial isolation check of one AXI4 address request.
//
// The ABU lets a HW-task reach only the address segments the processor has
// given it (up to N_SEG = 8, each a base and a size). This block takes the
// AW or AR payload of a request, works out the range of bytes the whole burst
// touches and reports whether that range lies inside at least one enabled
// segment. It is purely combinational, so checking adds no cycle to the
// request path.
//
// Burst footprint (AXI4 rules): bytes = (len+1) << size.
//   INCR : [addr, addr + bytes - 1]
//   FIXED: [addr, addr + (1 << size) - 1]
//   WRAP : the naturally aligned block of `bytes` bytes that holds addr
// The reserved burst encoding (2'b11) is never legal. A burst that runs past
// the top of the address space is never legal.
//
// The design description says that transactions outside the segments are
// blocked; checking the whole burst rather than only its start address, and
// the segment encoding (size 0 = unused), are this design's choices.
module abu_addr_checker
  import abu_pkg::*;
#(
  parameter int unsigned NSEG = abu_pkg::N_SEG
) (
  input  ax_chan_t                ax,
  input  segment_t [NSEG-1:0]     seg,
  output logic                    ok,     // burst lies inside a segment
  output logic     [NSEG-1:0]     hit     // which segments hold it
);

  localparam int unsigned EW = ADDR_W + 1;  // one extra bit for carries

  logic [EW-1:0] bytes, beat_bytes, first, last;

  always_comb begin
    bytes      = EW'((32'(ax.len) + 32'd1) << ax.size);
    beat_bytes = EW'(32'd1 << ax.size);
    first      = {1'b0, ax.addr};
    unique case (ax.burst)
      BURST_FIXED: last = first + beat_bytes - EW'(1);
      BURST_WRAP: begin
        first = first & ~(bytes - EW'(1));
        last  = first + bytes - EW'(1);
      end
      default:     last = first + bytes - EW'(1);  // INCR and reserved
    endcase
  end

  logic [EW-1:0] lo [NSEG];
  logic [EW-1:0] hi [NSEG];

  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    assign lo[s]  = {1'b0, seg[s].base};
    assign hi[s]  = lo[s] + {1'b0, seg[s].size} - EW'(1);
    assign hit[s] = (seg[s].size != '0) && (first >= lo[s]) && (last <= hi[s]);
  end

  assign ok = (|hit) && !last[ADDR_W] && (ax.burst != 2'b11);

endmodule
