// tb_rr_cluster: one AESware subsystem of NCORE cores driven at fixed AES
// request rates; a helper of tb_workload_request_rate, which runs it for
// one, two, four and eight cores side by side.
// Every core issues JOBS AES jobs at a fixed rate. With a 50 MHz clock a
// rate of R requests per second per core is one job every 50e6/R cycles.
// The rates are run one after another: 10k/s (every 5000 cycles), 100k/s
// (500), 520k/s (96) and 1040k/s (48). Each core reports as software time
// the cycle counts of a small in-order core running AES in software: 3081,
// 3691 and 4317 cycles for 128/192/256-bit keys. A core that is told to
// use software waits that long. A core whose next job is due while the
// previous one is still running starts it as soon as the previous one
// ends, so each core has at most one request in flight.
// For each rate the harness prints hardware and software jobs, the deepest
// queue and the mean wait from request to verdict. It checks every
// hardware result against FIPS-197 appendix C, that all jobs finish, that
// at 10k/s no request waits behind more than one other, and that at
// 1040k/s the engine is saturated (queue depth of at least NCORE/2).
// Interface: clock in; check and failure counts and a done flag out.
module tb_rr_cluster #(
  parameter int unsigned NCORE = 8,
  parameter int unsigned JOBS  = 6
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  import aes_pkg::*;
  import tb_aes_vec_pkg::*;
  localparam logic [31:0] AWR = 32'h5000_0000;
  localparam int SW_CYC [3] = '{3081, 3691, 4317};
  localparam int NRATE = 4;
  localparam int PERIOD [NRATE] = '{5000, 500, 96, 48};

  logic     rst_n = 0, aesware_state;
  bus_req_t core_req [NCORE];
  apb_rsp_t core_rsp [NCORE];
  bus_req_t noc_req  [NCORE];
  apb_rsp_t noc_rsp  [NCORE];
  logic [$clog2(NCORE>1?NCORE:2):0] queue_count;
  int done_cores = 0;
  int hw_jobs = 0, sw_jobs = 0, max_q = 0;
  longint wait_sum = 0;

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
  end

  aesware_system #(.NCORE(NCORE)) dut (.*);

  always_comb for (int c = 0; c < NCORE; c++) noc_rsp[c] = '{pready: 1'b1, prdata: 32'h0, pslverr: 1'b0};

  always @(posedge clk) if (rst_n && int'(queue_count) > max_q) max_q = int'(queue_count);

  task automatic chk(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic bus(input int c, input logic wr, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] rd);
    @(negedge clk);
    core_req[c] = '{psel: 1, penable: 0, pwrite: wr, paddr: a, pwdata: d};
    @(negedge clk);
    core_req[c].penable = 1;
    #1;
    while (!core_rsp[c].pready) begin
      @(negedge clk);
      #1;
    end
    rd = core_rsp[c].prdata;
    @(posedge clk);
    #1 core_req[c] = '0;
  endtask

  task automatic core_program(input int c, input int period);
    logic [31:0] rd;
    longint t0, due;
    due = $time / 20 + longint'(c * period / NCORE);    // cores start out of phase
    for (int j = 0; j < JOBS; j++) begin
      int kl;
      logic dec;
      logic [127:0] t, exp, res;
      logic [1:0] dir;
      while ($time / 20 < due) @(negedge clk);
      due = due + period;
      kl  = int'($urandom % 3);
      dec = 1'($urandom);
      t   = dec ? c_ct(kl) : C_PT;
      exp = dec ? C_PT : c_ct(kl);
      t0  = $time / 20;
      bus(c, 1, AWR, {16'(SW_CYC[kl]), 14'h0, 2'(kl)}, rd);
      dir = 2'd3;
      while (dir != 2'(DIR_HW) && dir != 2'(DIR_SW)) begin
        bus(c, 0, AWR, 0, rd);
        dir = rd[1:0];
      end
      wait_sum += $time / 20 - t0;
      if (dir == 2'(DIR_HW)) begin
        bus(c, 1, AWR + 32'h1000, {29'h0, 2'(kl), dec}, rd);
        for (int w = 0; w < 4; w++) bus(c, 1, AWR + 32'h1010 + 32'(4 * w), t[127 - 32 * w -: 32], rd);
        for (int w = 0; w < 4 + 2 * kl; w++) bus(c, 1, AWR + 32'h1020 + 32'(4 * w), c_key(kl) >> (224 - 32 * w), rd);
        for (int w = 0; w < 4; w++) begin
          bus(c, 0, AWR + 32'h1050 + 32'(4 * w), 0, rd);
          res[127 - 32 * w -: 32] = rd;
        end
        chk($sformatf("%0d cores: hardware AES result", NCORE), res, exp);
        hw_jobs++;
      end else begin
        sw_jobs++;
        repeat (SW_CYC[kl]) @(negedge clk);
      end
    end
    done_cores++;
  endtask

  initial begin
    for (int c = 0; c < NCORE; c++) core_req[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < NRATE; r++) begin
      hw_jobs = 0; sw_jobs = 0; max_q = 0; wait_sum = 0; done_cores = 0;
      for (int c = 0; c < NCORE; c++) begin
        automatic int cc = c;
        automatic int p = PERIOD[r];
        fork core_program(cc, p); join_none
      end
      wait (done_cores == NCORE);
      repeat (10) @(negedge clk);
      $display("%0d cores, rate %0dk/s per core: %0d hardware, %0d software jobs, deepest queue %0d, mean wait %0d cycles",
               NCORE, 50000 / PERIOD[r], hw_jobs, sw_jobs, max_q, int'(wait_sum / (NCORE * JOBS)));
      chk("all jobs done", hw_jobs + sw_jobs, NCORE * JOBS);
      if (r == 0) chk("low rate: at most two requests waiting", max_q <= 2, 1);
      if (r == NRATE - 1) chk("highest rate: engine saturated", max_q >= int'(NCORE / 2), 1);
      chk("idle between rates", aesware_state, 1);
    end
    done = 1'b1;
  end
endmodule
