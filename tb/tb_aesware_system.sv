// tb_aesware_system: end-to-end test of the eight-core subsystem at its
// default parameters. Every core runs a bus-functional program: it mixes
// ordinary interconnect accesses with AES jobs. For a job it posts a
// request on APB1 with its software time, polls the direction bits, and
// then either runs the job on the shared operator over APB2 (type, text,
// key, four result reads issued at once) or, when told to, "runs it in
// software" by waiting its software time. Jobs are the FIPS-197 appendix C
// examples (encryption and decryption, 128/192/256-bit keys), so every
// hardware result is checked against the published answer.
// The test counts, and fails if any never happened: hardware jobs of each
// kind, jobs sent to software, SJF reordering on arrival, ageing
// promotions, serialized APB1 writes, APB2 wait states, a refused APB2
// access from a core that does not hold the operator, and interconnect
// traffic through the per-core muxes.
module tb_aesware_system;
  import aes_pkg::*;
  import tb_aes_vec_pkg::*;
  localparam int NCORE = 8;
  localparam int JOBS  = 10;
  localparam logic [31:0] AWR = 32'h5000_0000;

  logic     clk = 0, rst_n = 0, aesware_state;
  bus_req_t core_req [NCORE];
  apb_rsp_t core_rsp [NCORE];
  bus_req_t noc_req  [NCORE];
  apb_rsp_t noc_rsp  [NCORE];
  logic [3:0] queue_count;
  int checks = 0, failures = 0;
  int hw_jobs[2][3], sw_jobs = 0, noc_ok = 0, refused = 0;
  int sjf_moves = 0, promotions = 0, apb1_stalls = 0, apb2_waits = 0, done_cores = 0;

  aesware_system dut (.*);

  always #5 clk = ~clk;

  // interconnect slave model: answers at once with a value derived from the address
  always_comb begin
    for (int c = 0; c < NCORE; c++)
      noc_rsp[c] = '{pready: 1'b1, prdata: noc_req[c].paddr ^ 32'hA5A5_0000, pslverr: 1'b0};
  end

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if (dut.u_aesware.u_arbiter.req_valid &&
        dut.u_aesware.u_arbiter.ins_prio < dut.u_aesware.u_arbiter.count) sjf_moves++;
    if (!dut.u_aesware.u_arbiter.req_valid && dut.u_aesware.u_arbiter.thr_hit) promotions++;
    for (int c = 0; c < NCORE; c++)
      if (dut.apb1_req[c].psel && dut.apb1_req[c].penable && !dut.apb1_rsp[c].pready) apb1_stalls++;
    if (dut.u_aesware.op_req.psel && dut.u_aesware.op_req.penable && !dut.u_aesware.op_rsp.pready)
      apb2_waits++;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic bus(input int c, input logic wr, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output logic err);
    @(negedge clk);
    core_req[c] = '{psel: 1, penable: 0, pwrite: wr, paddr: a, pwdata: d};
    @(negedge clk);
    core_req[c].penable = 1;
    #1;
    while (!core_rsp[c].pready) begin
      @(negedge clk);
      #1;
    end
    rd = core_rsp[c].prdata; err = core_rsp[c].pslverr;
    @(posedge clk);
    #1 core_req[c] = '0;
  endtask

  task automatic core_program(input int c);
    logic [31:0] rd;
    logic err;
    for (int j = 0; j < JOBS; j++) begin
      int kl, sw, gap;
      logic dec;
      logic [127:0] t, exp, res;
      logic [255:0] k;
      logic [1:0] dir;
      // ordinary traffic through the interconnect
      bus(c, 0, 32'h2000_0000 + 32'(c * 256 + j * 4), 0, rd, err);
      chk("interconnect read", rd, (32'h2000_0000 + 32'(c * 256 + j * 4)) ^ 32'hA5A5_0000);
      noc_ok++;
      kl  = int'($urandom % 3);
      dec = 1'($urandom);
      sw  = 300 + int'($urandom % 2700);
      k   = c_key(kl);
      t   = dec ? c_ct(kl) : C_PT;
      exp = dec ? C_PT : c_ct(kl);
      // core 0 pokes APB2 without holding the operator once: must be refused
      if (c == 0 && j == 0) begin
        bus(c, 1, AWR + 32'h1000, 32'h0, rd, err);
        chk("APB2 refused without grant", err, 1);
        refused++;
      end
      bus(c, 1, AWR, {16'(sw), 14'h0, 2'(kl)}, rd, err);
      chk("request accepted", err, 0);
      dir = 2'd3;
      while (dir != 2'(DIR_HW) && dir != 2'(DIR_SW)) begin
        bus(c, 0, AWR, 0, rd, err);
        chk("tag", rd[4:2], c[2:0]);
        dir = rd[1:0];
      end
      if (dir == 2'(DIR_HW)) begin
        bus(c, 1, AWR + 32'h1000 + 32'(A2_TYPE), {29'h0, 2'(kl), dec}, rd, err);
        for (int w = 0; w < 4; w++)
          bus(c, 1, AWR + 32'h1000 + 32'(A2_TEXT) + 32'(4 * w), t[127 - 32 * w -: 32], rd, err);
        for (int w = 0; w < 4 + 2 * kl; w++)
          bus(c, 1, AWR + 32'h1000 + 32'(A2_KEY) + 32'(4 * w), k[255 - 32 * w -: 32], rd, err);
        for (int w = 0; w < 4; w++) begin
          bus(c, 0, AWR + 32'h1000 + 32'(A2_RESULT) + 32'(4 * w), 0, rd, err);
          res[127 - 32 * w -: 32] = rd;
        end
        chk("hardware AES result", res, exp);
        hw_jobs[dec][kl]++;
      end else begin
        sw_jobs++;
        repeat (sw) @(negedge clk);      // the core computes AES itself
      end
      gap = int'($urandom % 40);
      repeat (gap) @(negedge clk);
    end
    done_cores++;
  endtask

  initial begin
    for (int c = 0; c < NCORE; c++) core_req[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NCORE; c++) begin
      automatic int cc = c;
      fork core_program(cc); join_none
    end
    wait (done_cores == NCORE);
    repeat (5) @(negedge clk);
    chk("operator idle at end", aesware_state, 1);
    chk("queue empty at end", queue_count, 0);
    for (int d = 0; d < 2; d++)
      for (int kl = 0; kl < 3; kl++) begin
        checks++;
        if (hw_jobs[d][kl] == 0) begin failures++; $display("FAIL no hardware job op=%0d keylen=%0d", d, kl); end
      end
    $display("hardware jobs enc %0d/%0d/%0d dec %0d/%0d/%0d, software %0d", hw_jobs[0][0], hw_jobs[0][1],
             hw_jobs[0][2], hw_jobs[1][0], hw_jobs[1][1], hw_jobs[1][2], sw_jobs);
    $display("SJF moves %0d, promotions %0d, APB1 stalls %0d, APB2 waits %0d, refused %0d, interconnect %0d",
             sjf_moves, promotions, apb1_stalls, apb2_waits, refused, noc_ok);
    checks++; if (sw_jobs == 0)     begin failures++; $display("FAIL no job sent to software"); end
    checks++; if (sjf_moves == 0)   begin failures++; $display("FAIL no SJF reordering"); end
    checks++; if (promotions == 0)  begin failures++; $display("FAIL no ageing promotion"); end
    checks++; if (apb1_stalls == 0) begin failures++; $display("FAIL no serialized APB1 write"); end
    checks++; if (apb2_waits == 0)  begin failures++; $display("FAIL no APB2 wait state"); end
    checks++; if (refused == 0)     begin failures++; $display("FAIL no refused APB2 access"); end
    checks++; if (noc_ok == 0)      begin failures++; $display("FAIL no interconnect traffic"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
