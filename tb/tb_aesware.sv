// tb_aesware: the AESware accelerator alone, with four cores driving its
// APB1 and APB2 ports directly. Each core runs six AES jobs (FIPS-197
// appendix C examples, random key length and direction) with random
// software times: it posts a request on APB1, polls for its direction
// bits and runs the job on the operator or waits its software time.
// Checks every hardware result against the published answer, that the
// tag returned on APB1 is the core's own, that the operator is never used
// by two cores at once, that some jobs were sent to software and that
// everything is idle at the end.
module tb_aesware;
  import aes_pkg::*;
  import tb_aes_vec_pkg::*;
  localparam int NCORE = 4;
  localparam int JOBS  = 6;

  logic     clk = 0, rst_n = 0, aesware_state;
  apb_req_t apb1_req [NCORE];
  apb_rsp_t apb1_rsp [NCORE];
  apb_req_t apb2_req [NCORE];
  apb_rsp_t apb2_rsp [NCORE];
  logic [2:0] queue_count;
  int checks = 0, failures = 0, hw_jobs = 0, sw_jobs = 0, done_cores = 0;
  int owner = -1;

  aesware #(.NCORE(NCORE)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
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

  task automatic apb(input int port, input int c, input logic wr, input logic [11:0] a,
                     input logic [31:0] d, output logic [31:0] rd, output logic err);
    apb_req_t r;
    r = '{psel: 1, penable: 0, pwrite: wr, paddr: a, pwdata: d};
    @(negedge clk);
    if (port == 1) apb1_req[c] = r; else apb2_req[c] = r;
    @(negedge clk);
    r.penable = 1;
    if (port == 1) apb1_req[c] = r; else apb2_req[c] = r;
    #1;
    while (!(port == 1 ? apb1_rsp[c].pready : apb2_rsp[c].pready)) begin
      @(negedge clk);
      #1;
    end
    rd  = (port == 1) ? apb1_rsp[c].prdata : apb2_rsp[c].prdata;
    err = (port == 1) ? apb1_rsp[c].pslverr : apb2_rsp[c].pslverr;
    @(posedge clk);
    #1;
    if (port == 1) apb1_req[c] = '0; else apb2_req[c] = '0;
  endtask

  task automatic core_program(input int c);
    logic [31:0] rd;
    logic err;
    for (int j = 0; j < JOBS; j++) begin
      int kl, sw;
      logic dec;
      logic [127:0] t, exp, res;
      logic [255:0] k;
      logic [1:0] dir;
      kl  = int'($urandom % 3);
      dec = 1'($urandom);
      sw  = 200 + int'($urandom % 1000);
      k   = c_key(kl);
      t   = dec ? c_ct(kl) : C_PT;
      exp = dec ? C_PT : c_ct(kl);
      apb(1, c, 1, 12'h000, {16'(sw), 14'h0, 2'(kl)}, rd, err);
      dir = 2'd3;
      while (dir != 2'(DIR_HW) && dir != 2'(DIR_SW)) begin
        apb(1, c, 0, 12'h000, 0, rd, err);
        chk("own tag", rd[3:2], c[1:0]);
        dir = rd[1:0];
      end
      if (dir == 2'(DIR_HW)) begin
        checks++;
        if (owner != -1) begin failures++; $display("FAIL two owners %0d %0d", owner, c); end
        owner = c;
        apb(2, c, 1, A2_TYPE, {29'h0, 2'(kl), dec}, rd, err);
        for (int w = 0; w < 4; w++) apb(2, c, 1, A2_TEXT + 12'(4 * w), t[127 - 32 * w -: 32], rd, err);
        for (int w = 0; w < 4 + 2 * kl; w++) apb(2, c, 1, A2_KEY + 12'(4 * w), k[255 - 32 * w -: 32], rd, err);
        for (int w = 0; w < 4; w++) begin
          if (w == 3) owner = -1;    // the operator is released by the last read
          apb(2, c, 0, A2_RESULT + 12'(4 * w), 0, rd, err);
          res[127 - 32 * w -: 32] = rd;
        end
        chk("hardware AES result", res, exp);
        hw_jobs++;
      end else begin
        sw_jobs++;
        repeat (sw) @(negedge clk);
      end
    end
    done_cores++;
  endtask

  initial begin
    for (int c = 0; c < NCORE; c++) begin apb1_req[c] = '0; apb2_req[c] = '0; end
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
    chk("all jobs done", hw_jobs + sw_jobs, NCORE * JOBS);
    checks++; if (hw_jobs == 0) begin failures++; $display("FAIL no hardware job"); end
    checks++; if (sw_jobs == 0) begin failures++; $display("FAIL no software job"); end
    $display("hardware jobs %0d, software jobs %0d", hw_jobs, sw_jobs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
