// aesware_threshold_detector: the Threshold Detector of the arbiter. It
// watches the Age_array and reports an entry whose age has passed
// Age_threshold, so that the arbiter can raise its priority.
// If several entries qualify, the one in the lowest queue slot is
// reported; the arbiter promotes one entry per clock and the others are
// found on later clocks.
// Interface: per-slot valid bits and ages in; hit and slot out. The
// threshold is the parameter AGE_TH, NCORE/3 by default. Combinational.
// The threshold of a third of the core count and the strict "greater
// than" test follow the original scheduling algorithm; the lowest-slot
// tie-break is this design's choice.
module aesware_threshold_detector #(
  parameter int unsigned NCORE  = 8,
  parameter int unsigned TAGW   = (NCORE > 1) ? $clog2(NCORE) : 1,
  parameter int unsigned AGEW   = 4,
  parameter int unsigned AGE_TH = NCORE / 3
) (
  input  logic            valid [NCORE],
  input  logic [AGEW-1:0] age   [NCORE],
  output logic            hit,
  output logic [TAGW-1:0] slot
);
  always_comb begin
    hit  = 1'b0;
    slot = '0;
    for (int i = NCORE - 1; i >= 0; i--) begin
      if (valid[i] && age[i] > AGEW'(AGE_TH)) begin
        hit  = 1'b1;
        slot = TAGW'(i);
      end
    end
  end
endmodule
