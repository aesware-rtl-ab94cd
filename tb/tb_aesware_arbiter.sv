// tb_aesware_arbiter: directed scheduling scenarios for eight cores
// (Age_threshold = 8/3 = 2), with expected decisions worked out by hand:
//  1. one request with an idle operator is popped to the operator (DIR_HW)
//     one cycle later, and no second pop happens while it is reserved;
//  2. SJF with ageing: while the operator is busy, requests arrive from
//     core 1 (256-bit), 2 (128), 3 (128), 4 (192). SJF pushes core 1 back
//     three times; its Age passes the threshold and it is promoted ahead
//     of core 4, so the pops must come in the order 2, 3, 1, 4;
//  3. software redirection: core 5 reports SW_time 100 < 244 and is sent
//     back (DIR_SW) at once; core 7 queued behind core 6 sees
//     HW_time 488 > 400 and is sent back, core 6 (SW_time 1000) stays.
module tb_aesware_arbiter;
  import aes_pkg::*;
  localparam int NCORE = 8;
  logic              clk = 0, rst_n = 0;
  logic              req_valid = 0;
  logic [2:0]        req_tag;
  logic [1:0]        req_keylen;
  logic [TIME_W-1:0] req_sw_time;
  logic              op_idle = 1;
  logic              out_valid;
  logic [2:0]        out_tag;
  dir_e              out_dir;
  logic              grant_valid;
  logic [2:0]        grant_tag;
  logic [3:0]        queue_count;
  int checks = 0, failures = 0;
  int hw_order[$], sw_order[$];

  aesware_arbiter #(.NCORE(NCORE)) dut (.*);

  always #5 clk = ~clk;

  always @(negedge clk) if (out_valid) begin
    if (out_dir == DIR_HW) hw_order.push_back(int'(out_tag));
    else if (out_dir == DIR_SW) sw_order.push_back(int'(out_tag));
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic request(input int tag, input logic [1:0] kl, input int sw);
    @(negedge clk);
    req_valid = 1; req_tag = 3'(tag); req_keylen = kl; req_sw_time = TIME_W'(sw);
    @(negedge clk);
    req_valid = 0;
  endtask

  // the operator runs one job: leaves idle for a few cycles and comes back
  task automatic run_job();
    @(negedge clk);
    op_idle = 0;
    repeat (5) @(negedge clk);
    op_idle = 1;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    req_tag = 0; req_keylen = 0; req_sw_time = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. immediate pop
    request(0, KEY128, 16'hffff);
    @(negedge clk);
    chk("popped one cycle after arrival", out_valid, 1);
    chk("pop direction", out_dir, DIR_HW);
    chk("pop tag", out_tag, 0);
    chk("operator reserved", grant_valid, 1);
    chk("grant tag", grant_tag, 0);
    // 2. SJF and ageing while core 0 holds the operator
    @(negedge clk);
    op_idle = 0;
    request(1, KEY256, 16'hffff);
    request(2, KEY128, 16'hffff);
    chk("core 1 pushed back once", dut.q[0].age, 1);
    request(3, KEY128, 16'hffff);
    request(4, KEY192, 16'hffff);
    chk("queue holds four", queue_count, 4);
    @(negedge clk);
    chk("no pop while reserved", hw_order.size(), 1);
    op_idle = 1;                                    // core 0 done
    repeat (3) @(negedge clk);
    for (int j = 0; j < 4; j++) begin
      chk("reserved after each pop", grant_valid, 1);
      run_job();
    end
    chk("five pops", hw_order.size(), 5);
    if (hw_order.size() == 5) begin
      chk("pop 2", hw_order[1], 2);
      chk("pop 3", hw_order[2], 3);
      chk("pop 4 (aged core 1)", hw_order[3], 1);
      chk("pop 5", hw_order[4], 4);
    end
    chk("queue empty", queue_count, 0);
    chk("nothing sent to software yet", sw_order.size(), 0);
    // 3. software redirection, operator busy with another job
    request(0, KEY128, 16'hffff);
    @(negedge clk);
    op_idle = 0;
    request(5, KEY128, 100);
    repeat (2) @(negedge clk);
    chk("core 5 sent to software", sw_order.size(), 1);
    if (sw_order.size() > 0) chk("software tag", sw_order[0], 5);
    request(6, KEY128, 1000);
    request(7, KEY128, 400);
    repeat (2) @(negedge clk);
    chk("core 7 sent to software", sw_order.size(), 2);
    if (sw_order.size() > 1) chk("software tag 2", sw_order[1], 7);
    chk("core 6 still queued", queue_count, 1);
    op_idle = 1;
    repeat (3) @(negedge clk);
    chk("core 6 popped", hw_order[hw_order.size() - 1], 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
