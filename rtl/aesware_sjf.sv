// aesware_sjf: the SJF (shortest job first) block of the arbiter. It works
// out where a new request enters the queue.
// The new entry would start at the back. It then moves forward past every
// entry at the tail whose estimated operator time is longer than its own,
// and stops behind the last entry that is not longer. The result is the
// priority the new entry receives. Every waiting entry whose priority is
// at or behind that value is pushed back by one place by the arbiter.
// Computed as one more than the largest priority held by an entry that is
// not longer than the new job (0 if there is none).
// Interface: per-slot valid bits, estimated times and priorities, plus the
// estimated time of the new job, in; the insertion priority out (TAGW+1
// bits so that a full queue position can be expressed). Combinational.
// Ordering by estimated time from the key length follows the original
// arbiter. Inserting from the tail rather than re-sorting the whole queue,
// so that promotions earned by ageing are kept, is this design's choice.
module aesware_sjf
  import aes_pkg::*;
#(
  parameter int unsigned NCORE = 8,
  parameter int unsigned TAGW  = (NCORE > 1) ? $clog2(NCORE) : 1
) (
  input  logic              valid   [NCORE],
  input  logic [TIME_W-1:0] est     [NCORE],
  input  logic [TAGW-1:0]   prio    [NCORE],
  input  logic [TIME_W-1:0] new_est,
  output logic [TAGW:0]     ins_prio
);
  always_comb begin
    ins_prio = '0;
    for (int i = 0; i < NCORE; i++) begin
      if (valid[i] && est[i] <= new_est && ({1'b0, prio[i]} + 1'b1) > ins_prio)
        ins_prio = {1'b0, prio[i]} + 1'b1;
    end
  end
endmodule
