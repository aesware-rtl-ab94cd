// aesware_wait_estimator: the Waiting Time Estimator of the arbiter. For
// every waiting entry it estimates HW_time, the number of cycles until
// that entry's job would be finished on the shared operator.
// HW_time of an entry is the sum of the estimated operator times of all
// entries with the same or a higher priority (lower or equal value),
// itself included. One adder tree per slot, built from NCORE masked terms.
// Interface: per-slot valid bits, estimated times and priorities in; one
// HW_time per slot out, wide enough for NCORE maximum times. Slots that
// are not valid get a value that the caller ignores. Combinational.
// The sum over the entries ahead follows the original algorithm. The job
// already running on the operator is not counted, as there; the operator
// is not asked how far it has got.
module aesware_wait_estimator
  import aes_pkg::*;
#(
  parameter int unsigned NCORE = 8,
  parameter int unsigned TAGW  = (NCORE > 1) ? $clog2(NCORE) : 1,
  parameter int unsigned SUM_W = TIME_W + TAGW + 1
) (
  input  logic              valid   [NCORE],
  input  logic [TIME_W-1:0] est     [NCORE],
  input  logic [TAGW-1:0]   prio    [NCORE],
  output logic [SUM_W-1:0]  hw_time [NCORE]
);
  always_comb begin
    for (int i = 0; i < NCORE; i++) begin
      hw_time[i] = '0;
      for (int j = 0; j < NCORE; j++) begin
        if (valid[j] && prio[j] <= prio[i]) hw_time[i] = hw_time[i] + SUM_W'(est[j]);
      end
    end
  end
endmodule
