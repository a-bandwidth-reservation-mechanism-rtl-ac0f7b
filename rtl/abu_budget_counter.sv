// abu_budget_counter: temporal isolation state of one ABU.
//
// The ABU holds a budget b. Every transaction that passes the ABU uses one
// unit of it, and every P clock cycles b is set back to its maximum B. A
// period counter runs 0, 1, ..., P-1 and raises `replenish` in its last cycle;
// on the following edge b is loaded with B and the counter starts again, so
// periods are exactly P cycles long and transactions counted in the last
// cycle of a period are charged to that period. P = 0 behaves as P = 1.
//
// Interface: `consume` is the number of transactions that completed their
// address handshake this cycle (0, 1 or 2: a read and a write may go in the
// same cycle). The enclosing ABU never lets more through than `budget`
// shows, and b saturates at 0 should B be lowered by reconfiguration.
// `budget` is the registered value of b, valid in the current cycle.
//
// Reset (synchronous, active low, like the AXI ARESETn) loads b with B and
// starts a period, so all ABUs reset together run their periods in lockstep.
//
// From the design description: consumption of one unit per transaction and
// replenishment to B every P cycles. Own choices: counting at the address
// handshake, the reset behaviour, the 16-bit widths.
module abu_budget_counter
  import abu_pkg::*;
#(
  parameter int unsigned W = abu_pkg::CNT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] cfg_budget,   // B
  input  logic [W-1:0] cfg_period,   // P, in clock cycles
  input  logic [1:0]   consume,      // transactions granted this cycle
  output logic [W-1:0] budget,       // b
  output logic [W-1:0] period_cnt,   // position inside the period
  output logic         replenish     // last cycle of the period
);

  // last cycle when period_cnt + 1 reaches P (also covers P = 0 and 1)
  assign replenish = ({1'b0, period_cnt} + (W+1)'(1)) >= {1'b0, cfg_period};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      period_cnt <= '0;
      budget     <= cfg_budget;
    end else begin
      if (replenish) begin
        period_cnt <= '0;
        budget     <= cfg_budget;
      end else begin
        period_cnt <= period_cnt + W'(1);
        budget     <= (budget > W'(consume)) ? budget - W'(consume) : '0;
      end
    end
  end

endmodule
