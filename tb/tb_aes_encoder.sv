// tb_aes_encoder: runs the AES encryption examples of FIPS-197 appendix C for
// 128-, 192- and 256-bit keys (round keys from aes_roundkey_gen), checks
// the result and that done comes 4*Nr+2 cycles after enable, then checks
// that a second operation right after the first gives the same result.
module tb_aes_encoder;
  import tb_aes_vec_pkg::*;
  logic         clk = 0, rst_n = 0, start = 0, ready, enable = 0, busy, done;
  logic [1:0]   keylen;
  logic [255:0] key;
  logic [3:0]   rk_round;
  logic [127:0] rk, text, result;
  int checks = 0, failures = 0;

  aes_roundkey_gen u_rk (.clk, .rst_n, .start, .keylen, .key, .ready, .rd_round(rk_round), .rd_key(rk));
  aes_encoder dut (.clk, .rst_n, .enable, .keylen, .text, .rk_round, .rk, .busy, .done, .result);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] t, output int cycles);
    @(negedge clk);
    text = t; enable = 1;
    @(negedge clk);
    enable = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    int cyc, nr;
    keylen = 0; key = '0; text = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int kl = 0; kl < 3; kl++) begin
      nr = 10 + 2 * kl;
      @(negedge clk);
      keylen = 2'(kl); key = c_key(kl); start = 1;
      @(negedge clk);
      start = 0;
      wait (ready);
      for (int rep = 0; rep < 2; rep++) begin
        run(C_PT, cyc);
        checks++;
        if (result !== c_ct(kl)) begin
          failures++;
          $display("FAIL key length %0d: result %032h expected %032h", kl, result, c_ct(kl));
        end
        checks++;
        if (cyc != 4 * nr + 2) begin
          failures++;
          $display("FAIL key length %0d: %0d cycles, expected %0d", kl, cyc, 4 * nr + 2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
