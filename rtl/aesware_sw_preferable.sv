// aesware_sw_preferable: the "Is Software Processing Preferable" block of
// the arbiter. It finds a waiting entry whose core would finish sooner by
// running the AES job in software than by waiting for the shared operator.
// An entry qualifies when its HW_time (from the Waiting Time Estimator) is
// larger than the SW_time its core sent with the request. Of the entries
// that qualify, the one with the highest priority (lowest value) is
// reported; the arbiter removes one entry per clock and tells its core to
// use software.
// Interface: per-slot valid bits, HW_time, SW_time and priorities in; hit
// and slot out. Combinational.
// The HW_time > SW_time test follows the original algorithm; reporting
// one entry, the foremost, per evaluation is this design's choice.
module aesware_sw_preferable
  import aes_pkg::*;
#(
  parameter int unsigned NCORE = 8,
  parameter int unsigned TAGW  = (NCORE > 1) ? $clog2(NCORE) : 1,
  parameter int unsigned SUM_W = TIME_W + TAGW + 1
) (
  input  logic              valid   [NCORE],
  input  logic [SUM_W-1:0]  hw_time [NCORE],
  input  logic [TIME_W-1:0] sw_time [NCORE],
  input  logic [TAGW-1:0]   prio    [NCORE],
  output logic              hit,
  output logic [TAGW-1:0]   slot
);
  logic [TAGW-1:0] best;

  always_comb begin
    hit  = 1'b0;
    slot = '0;
    best = '1;
    for (int i = 0; i < NCORE; i++) begin
      if (valid[i] && hw_time[i] > SUM_W'(sw_time[i]) && (!hit || prio[i] < best)) begin
        hit  = 1'b1;
        slot = TAGW'(i);
        best = prio[i];
      end
    end
  end
endmodule
