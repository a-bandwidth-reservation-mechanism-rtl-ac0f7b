// tb_abu_addr_checker: self-checking test of the segment check.
//
// Eight segments are placed at random (some disabled with size 0, some
// touching the top of the address space) and thousands of bursts of every
// type are checked against a reference that computes the burst's byte range
// with 64-bit integers and tests each segment in turn. Directed cases cover
// the exact segment edges (first and last byte inside, one byte outside) and
// a WRAP burst whose start address is unaligned.
module tb_abu_addr_checker;
  import abu_pkg::*;

  ax_chan_t               ax;
  segment_t [N_SEG-1:0]   seg;
  logic                   ok;
  logic     [N_SEG-1:0]   hit;

  int checks = 0, failures = 0;

  abu_addr_checker dut (.ax(ax), .seg(seg), .ok(ok), .hit(hit));

  // reference: is [first, last] inside segment s?
  function automatic bit ref_ok(input ax_chan_t a, input segment_t [N_SEG-1:0] sg,
                                output logic [N_SEG-1:0] h);
    longint unsigned nbytes, first, last, lo, hi;
    nbytes = (longint'(a.len) + 1) * (longint'(1) << a.size);
    first  = 64'(a.addr);
    if (a.burst == 2'b00)      last = first + (longint'(1) << a.size) - 1;
    else if (a.burst == 2'b10) begin
      first = (first / nbytes) * nbytes;
      last  = first + nbytes - 1;
    end else                   last = first + nbytes - 1;
    for (int s = 0; s < N_SEG; s++) begin
      lo   = 64'(sg[s].base);
      hi   = lo + 64'(sg[s].size) - 1;
      h[s] = (sg[s].size != 0) && first >= lo && last <= hi;
    end
    return (h != 0) && (last < 64'h1_0000_0000) && (a.burst != 2'b11);
  endfunction

  task automatic check(input string what);
    logic [N_SEG-1:0] h;
    bit e;
    #1;
    e = ref_ok(ax, seg, h);
    checks++;
    if (ok !== e || hit !== h) begin
      failures++;
      $display("FAIL %s addr=%h len=%0d size=%0d burst=%0d ok=%b exp=%b hit=%b exp=%b",
               what, ax.addr, ax.len, ax.size, ax.burst, ok, e, hit, h);
    end
  endtask

  task automatic random_segments();
    for (int s = 0; s < N_SEG; s++) begin
      seg[s].base = $urandom() & 32'hFFFF_F000;
      seg[s].size = ($urandom_range(0, 5) == 0) ? 32'd0 : ($urandom_range(1, 64) * 32'h1000);
      if (s == 7) begin  // one segment ending at the top of memory
        seg[s].base = 32'hFFFF_0000;
        seg[s].size = 32'h0001_0000;
      end
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ax = '0;
    // directed: one segment [0x1000_0000, 0x1000_FFFF]
    for (int s = 0; s < N_SEG; s++) seg[s] = '0;
    seg[2].base = 32'h1000_0000;
    seg[2].size = 32'h0001_0000;
    ax.size = 3'd3; ax.burst = 2'b01;
    ax.addr = 32'h1000_0000; ax.len = 8'd0;  check("first byte");
    if (ok !== 1'b1) begin failures++; $display("FAIL first beat should pass"); end
    ax.addr = 32'h1000_FFF8; ax.len = 8'd0;  check("last beat");
    if (ok !== 1'b1) begin failures++; $display("FAIL last beat should pass"); end
    ax.addr = 32'h1000_FFF8; ax.len = 8'd1;  check("one beat over");
    if (ok !== 1'b0) begin failures++; $display("FAIL burst past end should fail"); end
    ax.addr = 32'h0FFF_FFF8; ax.len = 8'd0;  check("below base");
    if (ok !== 1'b0) begin failures++; $display("FAIL below base should fail"); end
    ax.addr = 32'h1000_FFF0; ax.len = 8'd3; ax.burst = 2'b10; check("wrap inside");
    if (ok !== 1'b1) begin failures++; $display("FAIL wrap burst should pass"); end
    ax.addr = 32'h1000_FFF0; ax.len = 8'd1; ax.burst = 2'b00; check("fixed inside");
    if (ok !== 1'b1) begin failures++; $display("FAIL fixed burst should pass"); end
    ax.burst = 2'b11; check("reserved burst");
    if (ok !== 1'b0) begin failures++; $display("FAIL reserved burst should fail"); end
    seg[2].size = 32'd0; ax.burst = 2'b01; ax.len = 8'd0; ax.addr = 32'h1000_0000;
    check("disabled segment");
    if (ok !== 1'b0) begin failures++; $display("FAIL disabled segment should fail"); end

    // random
    for (int r = 0; r < 200; r++) begin
      random_segments();
      for (int k = 0; k < 50; k++) begin
        int s;
        s = $urandom_range(0, N_SEG-1);
        ax.id    = ID_W'($urandom());
        ax.len   = ($urandom_range(0, 3) == 0) ? 8'($urandom()) : 8'($urandom_range(0, 15));
        ax.size  = 3'($urandom_range(0, 3));
        ax.burst = 2'($urandom_range(0, 3));
        if (ax.burst == 2'b10) ax.len = 8'((1 << $urandom_range(1, 4)) - 1);
        // aim near a segment edge half of the time
        if ($urandom_range(0, 1) == 0)
          ax.addr = seg[s].base + seg[s].size - 32'($urandom_range(0, 2048));
        else
          ax.addr = $urandom();
        check("random");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
