// aesware_topmost_selector: the Topmost Element Selector of the arbiter.
// It looks through the Priority_array for the entry with the highest
// priority (value 0) and returns the Arbiter_queue slot that holds it.
// Because the arbiter keeps the priorities of the waiting entries at
// 0..n-1, a search for the value 0 is the same as a search for the lowest
// value, and needs only an equality compare per slot.
// Interface: per-slot valid bits and priorities in; hit (queue not empty)
// and the slot number out. Purely combinational, no clock.
// Searching for the lowest Priority_array value and using its slot follows
// the original arbiter; the equality-compare form is this design's choice.
module aesware_topmost_selector #(
  parameter int unsigned NCORE = 8,
  parameter int unsigned TAGW  = (NCORE > 1) ? $clog2(NCORE) : 1
) (
  input  logic            valid [NCORE],
  input  logic [TAGW-1:0] prio  [NCORE],
  output logic            hit,
  output logic [TAGW-1:0] slot
);
  always_comb begin
    hit  = 1'b0;
    slot = '0;
    for (int i = 0; i < NCORE; i++) begin
      if (valid[i] && prio[i] == '0) begin
        hit  = 1'b1;
        slot = TAGW'(i);
      end
    end
  end
endmodule
