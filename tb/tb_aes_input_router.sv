// tb_aes_input_router: writes the type, text and key registers through the
// router and checks each register, that start pulses one cycle after the
// write of key word Nk-1 (and not earlier), and that bad addresses, an
// invalid key length and writes while not accepted are refused.
module tb_aes_input_router;
  import aes_pkg::*;
  logic         clk = 0, rst_n = 0, wr_en = 0, accept = 1, wr_err, start;
  logic [11:0]  addr;
  logic [31:0]  wdata;
  aes_op_e      op;
  keylen_e      keylen;
  logic [127:0] text;
  logic [255:0] key;
  int checks = 0, failures = 0, starts = 0;

  aes_input_router dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [255:0] got, input logic [255:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // one write; returns the error flag seen with it
  task automatic wr(input logic [11:0] a, input logic [31:0] d, output logic err);
    @(negedge clk);
    addr = a; wdata = d; wr_en = 1;
    #1 err = wr_err;
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    logic err;
    addr = 0; wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int kl = 0; kl < 3; kl++) begin
      logic [255:0] k;
      logic [127:0] t;
      int nk;
      nk = 4 + 2 * kl;
      k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      t = {$urandom, $urandom, $urandom, $urandom};
      starts = 0;
      wr(A2_TYPE, {29'h0, kl[1:0], kl[0]}, err);
      chk("type err", err, 0);
      chk("op", op, kl[0]);
      chk("keylen", keylen, kl[1:0]);
      for (int w = 0; w < 4; w++) wr(A2_TEXT + 12'(4 * w), t[127 - 32 * w -: 32], err);
      chk("text", text, t);
      for (int w = 0; w < nk - 1; w++) wr(A2_KEY + 12'(4 * w), k[255 - 32 * w -: 32], err);
      chk("no start before last key word", starts, 0);
      // last key word: start must be seen right after this write
      @(negedge clk);
      addr = A2_KEY + 12'(4 * (nk - 1)); wdata = k[255 - 32 * (nk - 1) -: 32]; wr_en = 1;
      @(negedge clk);
      wr_en = 0;
      chk("start one cycle after last key word", start, 1);
      @(negedge clk);
      chk("start is one pulse", start, 0);
      chk("one start", starts, 1);
      chk("key", key[255 -: 32 * 8] & ({256{1'b1}} << (256 - 32 * nk)), k & ({256{1'b1}} << (256 - 32 * nk)));
    end
    wr(12'h004, 32'h1, err);         chk("bad address refused", err, 1);
    wr(A2_TYPE, 32'h6, err);         chk("key length 3 refused", err, 1);
    chk("keylen kept", keylen, KEY256);
    accept = 0;
    wr(A2_TEXT, 32'hdeadbeef, err);  chk("write while busy refused", err, 1);
    chk("text kept", text[127:96] == 32'hdeadbeef, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
