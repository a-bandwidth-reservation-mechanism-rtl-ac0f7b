// tb_abu_budget_counter: self-checking test of budget use and refill.
//
// For several periods P (0, 1, 2, 7 and 128 cycles) and budgets B the test
// resets the counter, then spends random amounts of budget (0, 1 or 2 per
// cycle, never more than is left, as the ABU does). A reference counts the
// cycles since reset on its own and checks every cycle that
//   * `replenish` is high exactly in cycles k*P - 1 (P = 0 counts as 1),
//   * `budget` equals B minus what was spent since the last refill,
//   * `period_cnt` equals the cycle number modulo P,
// so the refill rate of one every P cycles is checked cycle by cycle. One run
// also tries to spend more than is left and checks that b stops at 0.
module tb_abu_budget_counter;
  import abu_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  cnt_t       cfg_budget, cfg_period;
  logic [1:0] consume;
  cnt_t       budget, period_cnt;
  logic       replenish;

  int checks = 0, failures = 0;
  int refills = 0;

  abu_budget_counter dut (
    .clk, .rst_n, .cfg_budget, .cfg_period, .consume,
    .budget, .period_cnt, .replenish
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int unsigned b, input int unsigned p, input int cycles,
                     input bit overspend);
    int unsigned pe, k, exp_b, exp_pos;
    pe = (p == 0) ? 1 : p;
    cfg_budget = cnt_t'(b);
    cfg_period = cnt_t'(p);
    consume    = 2'd0;
    rst_n      = 1'b0;
    @(posedge clk);
    #1 rst_n   = 1'b1;
    exp_b      = b;
    for (k = 0; k < cycles; k++) begin
      exp_pos = k % pe;
      checks++;
      if (budget !== cnt_t'(exp_b) || period_cnt !== cnt_t'(exp_pos) ||
          replenish !== (exp_pos == pe - 1)) begin
        failures++;
        $display("FAIL B=%0d P=%0d cycle %0d: b=%0d exp %0d pos=%0d exp %0d repl=%b",
                 b, p, k, budget, exp_b, period_cnt, exp_pos, replenish);
      end
      if (overspend) consume = 2'd2;
      else consume = 2'($urandom_range(0, (exp_b < 2) ? exp_b : 2));
      if (replenish) refills++;
      @(posedge clk);
      #1;
      if (exp_pos == pe - 1) exp_b = b;
      else exp_b = (exp_b > 32'(consume)) ? exp_b - 32'(consume) : 0;
    end
    consume = 2'd0;
  endtask

  initial begin
    cfg_budget = '0; cfg_period = '0; consume = '0;
    repeat (2) @(posedge clk);
    run(10, 128, 700, 1'b0);
    run(5,  7,   300, 1'b0);
    run(3,  2,   100, 1'b0);
    run(4,  1,   50,  1'b0);
    run(4,  0,   50,  1'b0);
    run(144, 128, 600, 1'b0);
    run(7,  16,  100, 1'b1);   // spend more than B: b must stay at 0
    if (refills < 10) begin
      failures++;
      $display("FAIL only %0d refills seen", refills);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
