// tb_aes_operator: drives the AES operator over APB as a core would.
// Runs the FIPS-197 appendix C examples, encryption and decryption for all
// three key lengths, checks the result, the number of cycles from the last
// key write until the result can be read (85/99/113 for 128/192/256-bit
// keys), the wait states on an early result read, AESware_state, and the
// error on a write while busy. Then it encrypts and decrypts random blocks
// with random keys and checks that decryption returns the plain text.
module tb_aes_operator;
  import aes_pkg::*;
  import tb_aes_vec_pkg::*;
  logic     clk = 0, rst_n = 0, state_idle;
  apb_req_t apb_req;
  apb_rsp_t apb_rsp;
  int checks = 0, failures = 0, waits = 0;

  aes_operator dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
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

  task automatic apb(input logic wr, input logic [11:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output logic err);
    @(negedge clk);
    apb_req = '{psel: 1, penable: 0, pwrite: wr, paddr: a, pwdata: d};
    @(negedge clk);
    apb_req.penable = 1;
    #1;
    while (!apb_rsp.pready) begin
      waits++;
      @(negedge clk);
      #1;
    end
    rd = apb_rsp.prdata; err = apb_rsp.pslverr;
    @(posedge clk);
    #1 apb_req = '0;
  endtask

  // Full operation; returns result and cycles from last key write to valid result
  task automatic aes_op(input logic dec, input int kl, input logic [127:0] t, input logic [255:0] k,
                        output logic [127:0] res, output int cyc);
    logic [31:0] rd;
    logic err;
    apb(1, A2_TYPE, {29'h0, 2'(kl), dec}, rd, err);
    for (int w = 0; w < 4; w++) apb(1, A2_TEXT + 12'(4 * w), t[127 - 32 * w -: 32], rd, err);
    for (int w = 0; w < 4 + 2 * kl; w++) apb(1, A2_KEY + 12'(4 * w), k[255 - 32 * w -: 32], rd, err);
    cyc = 0;
    while (dut.state != dut.O_RESULT) begin
      @(posedge clk);
      cyc++;
    end
    for (int w = 0; w < 4; w++) begin
      apb(0, A2_RESULT + 12'(4 * w), 0, rd, err);
      res[127 - 32 * w -: 32] = rd;
    end
  endtask

  initial begin
    logic [127:0] res, t;
    logic [255:0] k;
    logic [31:0] rd;
    logic err;
    int cyc, w0;
    apb_req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("idle after reset", state_idle, 1);
    for (int kl = 0; kl < 3; kl++) begin
      aes_op(0, kl, C_PT, c_key(kl), res, cyc);
      chk("encrypt", res, c_ct(kl));
      chk("encrypt cycles", cyc, 85 + 14 * kl);
      chk("idle after result read", state_idle, 1);
      aes_op(1, kl, c_ct(kl), c_key(kl), res, cyc);
      chk("decrypt", res, C_PT);
      chk("decrypt cycles", cyc, 85 + 14 * kl);
    end
    // early result read: must be held with wait states, then return the result
    apb(1, A2_TYPE, 32'h0, rd, err);
    for (int w = 0; w < 4; w++) apb(1, A2_TEXT + 12'(4 * w), C_PT[127 - 32 * w -: 32], rd, err);
    for (int w = 0; w < 4; w++) apb(1, A2_KEY + 12'(4 * w), C_KEY[255 - 32 * w -: 32], rd, err);
    chk("busy after start", state_idle, 0);
    apb(1, A2_TEXT, 32'h1234, rd, err);
    chk("write while busy refused", err, 1);
    w0 = waits;
    apb(0, A2_RESULT, 0, rd, err);
    chk("early read waited", waits - w0 > 50, 1);
    chk("early read data", rd, C_CT128[127:96]);
    for (int w = 1; w < 4; w++) apb(0, A2_RESULT + 12'(4 * w), 0, rd, err);
    chk("last word", rd, C_CT128[31:0]);
    apb(0, A2_RESULT, 0, rd, err);
    chk("result read when idle refused", err, 1);
    // random round trips
    for (int i = 0; i < 12; i++) begin
      logic [127:0] ct;
      int kl;
      kl = i % 3;
      t = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      aes_op(0, kl, t, k, ct, cyc);
      aes_op(1, kl, ct, k, res, cyc);
      chk("round trip", res, t);
      chk("cipher differs from plain", ct != t, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
