// tb_workload_request_rate: the request-rate workload on AESware
// subsystems of one, two, four and eight cores, run side by side on one 50 MHz
// clock. Each subsystem is a tb_rr_cluster instance, which drives every
// core at 10k, 100k, 520k and 1040k AES requests per second, checks the
// results and prints the queue depth and the mean wait at each rate. The
// eight-core subsystem uses the default parameters of the top level. This
// module adds up the counts, keeps the watchdog and ends the simulation.
module tb_workload_request_rate;
  logic clk = 0;
  int   ck [4], fl [4];
  logic dn [4];
  int   checks, failures;

  always #10 clk = ~clk;   // 50 MHz

  tb_rr_cluster #(.NCORE(1)) u_single (.clk(clk), .checks(ck[0]), .failures(fl[0]), .done(dn[0]));
  tb_rr_cluster #(.NCORE(2)) u_dual   (.clk(clk), .checks(ck[1]), .failures(fl[1]), .done(dn[1]));
  tb_rr_cluster #(.NCORE(4)) u_quad   (.clk(clk), .checks(ck[2]), .failures(fl[2]), .done(dn[2]));
  tb_rr_cluster              u_octa   (.clk(clk), .checks(ck[3]), .failures(fl[3]), .done(dn[3]));

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ck[0] + ck[1] + ck[2] + ck[3], fl[0] + fl[1] + fl[2] + fl[3] + 1);
    $finish;
  end

  initial begin
    #1;
    wait (dn[0] && dn[1] && dn[2] && dn[3]);
    checks   = ck[0] + ck[1] + ck[2] + ck[3];
    failures = fl[0] + fl[1] + fl[2] + fl[3];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
