// aesware_arbiter: the AESware_Arbiter, which decides which core uses the
// shared AES operator next and which cores should run AES in software.
//
// It holds one entry per core in the Arbiter_queue (core tag, estimated
// operator time from the key length, software time reported by the core)
// plus a Priority_array (0 = served first) and an Age_array. At most one
// of the following events is handled per clock, in this order:
//  1. New request arrival. The entry gets the lowest priority and Age 0;
//     then the SJF step moves it ahead of every entry behind which only
//     longer jobs wait (stable insertion from the tail); each entry it
//     passes is downgraded by one and its Age goes up by one.
//  2. Threshold Detector / Priority Change Detector: an entry whose Age
//     exceeds Age_threshold (NCORE/3) is promoted one place (it swaps with
//     the entry just ahead) and its Age is reset to 0.
//  3. Pop (Topmost Element Selector AND AESware_state): when the operator is
//     idle and not reserved, the entry with priority 0 leaves the queue,
//     its tag is sent out with direction DIR_HW, the operator becomes
//     reserved for it and every other priority drops by one.
//  4. Is Software Processing Preferable: the Waiting Time Estimator gives
//     each entry HW_time = sum of the estimated times of the entries at
//     its priority or ahead of it (itself included). The first entry, in
//     priority order, whose HW_time exceeds its SW_time is removed and its
//     tag is sent out with direction DIR_SW.
// The reservation ends when the operator has left the idle state and come
// back to it (result delivered).
// The combinational detectors are separate modules named after the blocks
// of the original arbiter: aesware_sjf, aesware_threshold_detector,
// aesware_topmost_selector, aesware_wait_estimator and
// aesware_sw_preferable. The Priority Change Detector (Age +1 for every
// entry pushed back, Age reset on promotion) is part of the register update
// below.
//
// Interface: req_valid for one cycle with req_tag, req_keylen, req_sw_time
// (at most one request per core may wait at a time; that is enforced by
// the APB1 port). out_valid pulses with out_tag and out_dir. grant_valid /
// grant_tag name the core that holds the operator. Latency: an arrival is
// queued in the cycle it is presented; a pop happens on the first free
// cycle in which the operator is idle and unreserved.
//
// The arrays, SJF-with-aging, the threshold NCORE/3, the pop and the
// software decision follow the original scheduling algorithm. Handling one event
// per cycle, the exact SJF insertion rule, the swap used for promotion and
// leaving the running operation out of HW_time are this design's choices.
module aesware_arbiter
  import aes_pkg::*;
#(
  parameter int unsigned NCORE = 8,
  parameter int unsigned TAGW  = (NCORE > 1) ? $clog2(NCORE) : 1,
  parameter int unsigned AGEW  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // new request from the APB1 port
  input  logic              req_valid,
  input  logic [TAGW-1:0]   req_tag,
  input  logic [1:0]        req_keylen,
  input  logic [TIME_W-1:0] req_sw_time,
  // AESware_state: 1 when the operator is idle
  input  logic              op_idle,
  // decision to the core: tag and direction bits
  output logic              out_valid,
  output logic [TAGW-1:0]   out_tag,
  output dir_e              out_dir,
  // current owner of the operator
  output logic              grant_valid,
  output logic [TAGW-1:0]   grant_tag,
  output logic [TAGW:0]     queue_count
);
  localparam int unsigned AGE_TH = NCORE / 3;
  localparam int unsigned SUM_W  = TIME_W + TAGW + 1;

  typedef struct packed {
    logic              valid;
    logic [TAGW-1:0]   tag;
    logic [TIME_W-1:0] est;
    logic [TIME_W-1:0] sw;
    logic [TAGW-1:0]   prio;
    logic [AGEW-1:0]   age;
  } entry_t;

  entry_t q [NCORE];          // Arbiter_queue with Priority_array and Age_array
  logic   seen_busy;

  // ---------------------------------------------------------- helpers (comb)
  logic [TAGW:0]     count;
  logic [TAGW-1:0]   free_slot;
  logic [TIME_W-1:0] new_est;
  logic [TAGW:0]     ins_prio;      // SJF insertion position of a new request
  logic              thr_hit;
  logic [TAGW-1:0]   thr_slot;
  logic              top_hit;
  logic [TAGW-1:0]   top_slot;      // Topmost Element Selector
  logic [SUM_W-1:0]  hw_time [NCORE];
  logic              sw_hit;
  logic [TAGW-1:0]   sw_slot;
  logic              do_pop;

  // per-slot views of the queue for the detector blocks
  logic              v_a   [NCORE];
  logic [TIME_W-1:0] est_a [NCORE];
  logic [TIME_W-1:0] sw_a  [NCORE];
  logic [TAGW-1:0]   pri_a [NCORE];
  logic [AGEW-1:0]   age_a [NCORE];

  assign new_est = est_time(req_keylen);

  always_comb begin
    count     = '0;
    free_slot = '0;
    for (int i = NCORE - 1; i >= 0; i--) begin
      if (!q[i].valid) free_slot = TAGW'(i);
    end
    for (int i = 0; i < NCORE; i++) begin
      v_a[i]   = q[i].valid;
      est_a[i] = q[i].est;
      sw_a[i]  = q[i].sw;
      pri_a[i] = q[i].prio;
      age_a[i] = q[i].age;
      if (q[i].valid) count = count + 1'b1;
    end
  end

  aesware_sjf #(.NCORE(NCORE), .TAGW(TAGW)) u_sjf (
    .valid(v_a), .est(est_a), .prio(pri_a), .new_est(new_est), .ins_prio(ins_prio)
  );

  aesware_threshold_detector #(.NCORE(NCORE), .TAGW(TAGW), .AGEW(AGEW), .AGE_TH(AGE_TH)) u_thr (
    .valid(v_a), .age(age_a), .hit(thr_hit), .slot(thr_slot)
  );

  aesware_topmost_selector #(.NCORE(NCORE), .TAGW(TAGW)) u_top (
    .valid(v_a), .prio(pri_a), .hit(top_hit), .slot(top_slot)
  );

  aesware_wait_estimator #(.NCORE(NCORE), .TAGW(TAGW), .SUM_W(SUM_W)) u_wte (
    .valid(v_a), .est(est_a), .prio(pri_a), .hw_time(hw_time)
  );

  aesware_sw_preferable #(.NCORE(NCORE), .TAGW(TAGW), .SUM_W(SUM_W)) u_swp (
    .valid(v_a), .hw_time(hw_time), .sw_time(sw_a), .prio(pri_a), .hit(sw_hit), .slot(sw_slot)
  );

  assign do_pop      = top_hit && op_idle && !grant_valid;
  assign queue_count = count;

  // ------------------------------------------------------------ sequential
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCORE; i++) q[i] <= '0;
      out_valid   <= 1'b0;
      out_tag     <= '0;
      out_dir     <= DIR_NONE;
      grant_valid <= 1'b0;
      grant_tag   <= '0;
      seen_busy   <= 1'b0;
    end else begin
      out_valid <= 1'b0;

      // reservation tracking: operator left idle and came back
      if (grant_valid) begin
        if (!op_idle) seen_busy <= 1'b1;
        else if (seen_busy) begin
          grant_valid <= 1'b0;
          seen_busy   <= 1'b0;
        end
      end

      if (req_valid) begin
        // 1. new request: enqueue, SJF insertion, ageing of passed entries
        for (int i = 0; i < NCORE; i++) begin
          if (q[i].valid && {1'b0, q[i].prio} >= ins_prio) begin
            q[i].prio <= q[i].prio + 1'b1;
            if (q[i].age != '1) q[i].age <= q[i].age + 1'b1;
          end
        end
        q[free_slot] <= '{valid: 1'b1, tag: req_tag, est: new_est, sw: req_sw_time,
                          prio: TAGW'(ins_prio), age: '0};
      end else if (thr_hit) begin
        // 2. Threshold Detector promotes, Priority Change Detector clears Age
        for (int i = 0; i < NCORE; i++) begin
          if (q[thr_slot].prio != '0 && q[i].valid && q[i].prio == q[thr_slot].prio - 1'b1)
            q[i].prio <= q[i].prio + 1'b1;
        end
        if (q[thr_slot].prio != '0) q[thr_slot].prio <= q[thr_slot].prio - 1'b1;
        q[thr_slot].age <= '0;
      end else if (do_pop) begin
        // 3. pop the topmost element to the operator
        for (int i = 0; i < NCORE; i++) begin
          if (q[i].valid) q[i].prio <= q[i].prio - 1'b1;
        end
        q[top_slot].valid <= 1'b0;
        out_valid   <= 1'b1;
        out_tag     <= q[top_slot].tag;
        out_dir     <= DIR_HW;
        grant_valid <= 1'b1;
        grant_tag   <= q[top_slot].tag;
        seen_busy   <= 1'b0;
      end else if (sw_hit) begin
        // 4. send the request back for software processing
        for (int i = 0; i < NCORE; i++) begin
          if (q[i].valid && q[i].prio > q[sw_slot].prio) q[i].prio <= q[i].prio - 1'b1;
        end
        q[sw_slot].valid <= 1'b0;
        out_valid <= 1'b1;
        out_tag   <= q[sw_slot].tag;
        out_dir   <= DIR_SW;
      end
    end
  end

  // The queue never holds more entries than there are cores.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  req_valid |-> count < (TAGW+1)'(NCORE));

endmodule
