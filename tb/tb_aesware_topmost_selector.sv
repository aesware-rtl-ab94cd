// tb_aesware_topmost_selector: checks the Topmost Element Selector on
// random queues of 0..8 waiting entries in random slots. The expected slot
// is taken from the list of slots in priority order that the stimulus
// builds, so it does not depend on how the block searches. Also checks an
// empty queue gives no hit. Combinational block; a clock exists only for
// the watchdog.
module tb_aesware_topmost_selector;
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

  logic            hit;
  logic [TAGW-1:0] slot;

  aesware_topmost_selector dut (.valid(valid), .prio(prio), .hit(hit), .slot(slot));

  initial begin
    for (int v = 0; v < NVEC; v++) begin
      random_queue(0, 0, 1);
      @(negedge clk);
      chk("hit", hit, n > 0);
      if (n > 0) chk("slot of priority 0", slot, order[0]);
    end
    for (int i = 0; i < NCORE; i++) valid[i] = 1'b0;
    @(negedge clk);
    chk("empty queue", hit, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
