// tb_aesware_sw_preferable: checks the software decision on random
// queues. HW_time per entry is worked out here as a running sum in
// priority order and driven into the block together with random SW_time
// values (300..1800 cycles), so that some entries qualify and some do not.
// Expected: a hit exactly when some waiting entry has HW_time > SW_time,
// and then the first such entry in priority order. Combinational block; a
// clock exists only for the watchdog.
module tb_aesware_sw_preferable;
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

  logic [SUM_W-1:0] hw [NCORE];
  logic             hit;
  logic [TAGW-1:0]  slot;

  aesware_sw_preferable dut (.valid(valid), .hw_time(hw), .sw_time(sw), .prio(prio),
                             .hit(hit), .slot(slot));

  initial begin
    int multi;
    multi = 0;
    for (int v = 0; v < NVEC; v++) begin
      int run, exp_slot, nq;
      random_queue(0, 300, 1500);
      for (int i = 0; i < NCORE; i++) hw[i] = SUM_W'($urandom);
      run = 0;
      exp_slot = -1;
      nq = 0;
      for (int k = 0; k < n; k++) begin
        run += int'(est[order[k]]);
        hw[order[k]] = SUM_W'(run);
        if (run > int'(sw[order[k]])) begin
          nq++;
          if (exp_slot < 0) exp_slot = order[k];
        end
      end
      if (nq > 1) multi++;
      @(negedge clk);
      chk("hit", hit, exp_slot >= 0);
      if (exp_slot >= 0) chk("foremost qualifying slot", slot, exp_slot);
    end
    chk("several qualifying entries were seen", multi > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
