// tb_aesware_apb1: three cores post requests in the same cycle; the port
// must hand them to the arbiter one per cycle in core order, holding the
// others with PREADY low, and pass key length and SW_time. Reads must
// return {tag, direction}: 3 (queued) after a request, then the decision
// sent back by the arbiter. A second request while queued and a bad
// address are refused with PSLVERR.
module tb_aesware_apb1;
  import aes_pkg::*;
  localparam int NCORE = 4;
  logic              clk = 0, rst_n = 0;
  apb_req_t          apb_req [NCORE];
  apb_rsp_t          apb_rsp [NCORE];
  logic              req_valid;
  logic [1:0]        req_tag;
  logic [1:0]        req_keylen;
  logic [TIME_W-1:0] req_sw_time;
  logic              dec_valid = 0;
  logic [1:0]        dec_tag = 0;
  dir_e              dec_dir = DIR_NONE;
  int checks = 0, failures = 0, stalls = 0;
  int tags[$], kls[$], sws[$];

  aesware_apb1 #(.NCORE(NCORE)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (req_valid) begin
      tags.push_back(int'(req_tag)); kls.push_back(int'(req_keylen)); sws.push_back(int'(req_sw_time));
    end
    for (int c = 0; c < NCORE; c++)
      if (apb_req[c].psel && apb_req[c].penable && !apb_rsp[c].pready) stalls++;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
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

  task automatic apb(input int c, input logic wr, input logic [11:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output logic err);
    @(negedge clk);
    apb_req[c] = '{psel: 1, penable: 0, pwrite: wr, paddr: a, pwdata: d};
    @(negedge clk);
    apb_req[c].penable = 1;
    #1;
    while (!apb_rsp[c].pready) begin
      @(negedge clk);
      #1;
    end
    rd = apb_rsp[c].prdata; err = apb_rsp[c].pslverr;
    @(posedge clk);
    #1 apb_req[c] = '0;
  endtask

  initial begin
    logic [31:0] rd;
    logic err;
    for (int c = 0; c < NCORE; c++) apb_req[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      begin logic [31:0] r; logic e; apb(2, 1, 12'h000, {16'd3000, 14'h0, 2'd2}, r, e); end
      begin logic [31:0] r; logic e; apb(1, 1, 12'h000, {16'd2000, 14'h0, 2'd1}, r, e); end
      begin logic [31:0] r; logic e; apb(3, 1, 12'h000, {16'd4000, 14'h0, 2'd0}, r, e); end
    join
    chk("three requests", tags.size(), 3);
    if (tags.size() == 3) begin
      chk("first core 1", tags[0], 1); chk("keylen 1", kls[0], 1); chk("sw 1", sws[0], 2000);
      chk("then core 2", tags[1], 2);  chk("keylen 2", kls[1], 2); chk("sw 2", sws[1], 3000);
      chk("then core 3", tags[2], 3);  chk("keylen 3", kls[2], 0); chk("sw 3", sws[2], 4000);
    end
    chk("stall cycles", stalls, 3);
    apb(2, 0, 12'h000, 0, rd, err);
    chk("core 2 queued", rd, (2 << 2) | 3);
    apb(0, 0, 12'h000, 0, rd, err);
    chk("core 0 nothing", rd, 0);
    apb(2, 1, 12'h000, 32'h1, rd, err);
    chk("second request refused", err, 1);
    chk("not passed on", tags.size(), 3);
    apb(1, 0, 12'h008, 0, rd, err);
    chk("bad address", err, 1);
    // decisions from the arbiter
    @(negedge clk);
    dec_valid = 1; dec_tag = 2; dec_dir = DIR_HW;
    @(negedge clk);
    dec_tag = 3; dec_dir = DIR_SW;
    @(negedge clk);
    dec_valid = 0;
    apb(2, 0, 12'h000, 0, rd, err);
    chk("core 2 go", rd, (2 << 2) | 1);
    apb(3, 0, 12'h000, 0, rd, err);
    chk("core 3 software", rd, (3 << 2) | 2);
    apb(1, 0, 12'h000, 0, rd, err);
    chk("core 1 still queued", rd, (1 << 2) | 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
