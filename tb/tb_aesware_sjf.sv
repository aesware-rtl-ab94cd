// tb_aesware_sjf: checks the shortest-job-first insertion point on random
// queues. The reference walks the queue from its tail, in priority order,
// and steps forward past every entry whose estimated time is longer than
// the new job, stopping at the first one that is not longer; the number of
// entries left in front is the expected priority. Equal times must not be
// passed (the new job queues behind them). Combinational block; a clock
// exists only for the watchdog.
module tb_aesware_sjf;
  import aes_pkg::*;
  localparam int unsigned NCORE = 8;
  localparam int unsigned TAGW  = 3;
  localparam int unsigned SUM_W = TIME_W + TAGW + 1;
  localparam int          NVEC  = 2000;

  logic              clk = 0;
  logic              valid [NCORE];
  logic [TIME_W-1:0] est   [NCORE];
  logic [TIME_W-1:0] sw    [NCORE];
  logic [TAGW-1:0]   prio  [NCORE];
  logic [3:0]        age   [NCORE];
  int                order [NCORE];   // order[k] = slot holding priority k
  int                n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NVEC * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // A random queue: n valid entries in random slots holding priorities
  // 0..n-1; free slots carry random leftovers that must be ignored.
  task automatic random_queue(input int max_age, input int sw_lo, input int sw_span);
    int perm [NCORE];
    for (int i = 0; i < NCORE; i++) perm[i] = i;
    for (int i = NCORE - 1; i > 0; i--) begin
      int j, t;
      j = int'($urandom % (i + 1));
      t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    n = int'($urandom % (NCORE + 1));
    for (int i = 0; i < NCORE; i++) begin
      valid[i] = 1'b0;
      prio[i]  = TAGW'($urandom);
      est[i]   = est_time(2'($urandom % 3));
      sw[i]    = TIME_W'(sw_lo + int'($urandom % sw_span));
      age[i]   = 4'($urandom % (max_age + 1));
    end
    for (int k = 0; k < n; k++) begin
      valid[perm[k]] = 1'b1;
      prio[perm[k]]  = TAGW'(k);
      order[k]       = perm[k];
    end
  endtask

  logic [TIME_W-1:0] new_est;
  logic [TAGW:0]     ins_prio;

  aesware_sjf dut (.valid(valid), .est(est), .prio(prio), .new_est(new_est), .ins_prio(ins_prio));

  initial begin
    int ties;
    ties = 0;
    for (int v = 0; v < NVEC; v++) begin
      int p;
      random_queue(0, 0, 1);
      new_est = est_time(2'($urandom % 3));
      p = n;
      while (p > 0 && est[order[p - 1]] > new_est) p--;
      if (p > 0 && est[order[p - 1]] == new_est) ties++;
      @(negedge clk);
      chk("insertion priority", ins_prio, p);
    end
    chk("ties with an equal job were exercised", ties > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
