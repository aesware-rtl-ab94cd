// tb_aes_roundkey_gen: expands the key-expansion examples of FIPS-197
// (appendix A, 128/192/256-bit keys) and the appendix C keys, checks the
// first round key (the key itself), the second round key word 4 for the
// 128-bit example and the last round key, and checks that ready rises
// 1 + 4*(Nr+1) - Nk cycles after start.
module tb_aes_roundkey_gen;
  import tb_aes_vec_pkg::*;
  logic         clk = 0, rst_n = 0, start = 0, ready;
  logic [1:0]   keylen;
  logic [255:0] key;
  logic [3:0]   rd_round;
  logic [127:0] rd_key;
  int checks = 0, failures = 0;

  aes_roundkey_gen dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic expand(input logic [1:0] kl, input logic [255:0] k, output int cycles);
    @(negedge clk);
    keylen = kl; key = k; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!ready) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    int cyc, nk, nr;
    rd_round = 0; keylen = 0; key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int kl = 0; kl < 3; kl++) begin
      logic [255:0] k;
      logic [127:0] last;
      k    = (kl == 0) ? A_KEY128 : (kl == 1) ? A_KEY192 : A_KEY256;
      last = (kl == 0) ? A_LAST128 : (kl == 1) ? A_LAST192 : A_LAST256;
      nk = 4 + 2 * kl; nr = nk + 6;
      expand(2'(kl), k, cyc);
      checks++;
      if (cyc != 1 + 4 * (nr + 1) - nk) begin
        failures++;
        $display("FAIL key length %0d: ready after %0d cycles, expected %0d", kl, cyc, 1 + 4 * (nr + 1) - nk);
      end
      rd_round = 0; #1 chk("round 0", rd_key, k[255:128]);
      rd_round = 4'(nr); #1 chk("last round", rd_key, last);
      if (kl == 0) begin
        rd_round = 1; #1 chk("w[4]", {rd_key[127:96], 96'h0}, {32'ha0fafe17, 96'h0});
      end
      if (kl == 2) begin
        rd_round = 2; #1 chk("w[8]", {rd_key[127:96], 96'h0}, {32'h9ba35411, 96'h0});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
