// tb_aes_sbox: checks the forward and inverse S-box against published
// S-box entries and checks that the inverse undoes the forward box for all
// 256 bytes and that the forward box is a permutation.
module tb_aes_sbox;
  logic [7:0] din, fwd, inv_of_fwd, inv_in, inv_out;
  int checks = 0, failures = 0;

  aes_sbox #(.INVERSE(1'b0)) u_fwd  (.din(din),    .dout(fwd));
  aes_sbox #(.INVERSE(1'b1)) u_inv  (.din(fwd),    .dout(inv_of_fwd));
  aes_sbox #(.INVERSE(1'b1)) u_inv2 (.din(inv_in), .dout(inv_out));

  task automatic chk(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] seen;
    seen = '0;
    // published entries of the forward box (FIPS-197 figure 7)
    din = 8'h00; #1 chk("S(00)", fwd, 8'h63);
    din = 8'h01; #1 chk("S(01)", fwd, 8'h7c);
    din = 8'h53; #1 chk("S(53)", fwd, 8'hed);
    din = 8'h9a; #1 chk("S(9a)", fwd, 8'hb8);
    din = 8'hff; #1 chk("S(ff)", fwd, 8'h16);
    din = 8'h10; #1 chk("S(10)", fwd, 8'hca);
    // published entries of the inverse box (FIPS-197 figure 14)
    inv_in = 8'h00; #1 chk("Si(00)", inv_out, 8'h52);
    inv_in = 8'h63; #1 chk("Si(63)", inv_out, 8'h00);
    inv_in = 8'hff; #1 chk("Si(ff)", inv_out, 8'h7d);
    for (int i = 0; i < 256; i++) begin
      din = 8'(i);
      #1;
      chk("inverse of forward", inv_of_fwd, 8'(i));
      checks++;
      if (seen[fwd]) begin
        failures++;
        $display("FAIL forward box repeats %02h", fwd);
      end
      seen[fwd] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
