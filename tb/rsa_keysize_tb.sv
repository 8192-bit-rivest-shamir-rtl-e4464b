// rsa_keysize_tb: runs the core built for 128-bit and for 1024-bit keys, two
// of the key sizes the accelerator is evaluated at, each with full-length
// private exponents (see rsa_keysize_run). The 8192-bit size is exercised by
// rsa_coprocessor_full_tb with the public exponent 65537; a full-length
// 8192-bit exponent takes about 67 million clocks.
module rsa_keysize_tb;

  logic clk = 1'b0, rst_n = 1'b0;
  logic fin_128, fin_1024;
  int   chk_128, chk_1024, fail_128, fail_1024;
  int   checks, failures;

  always #5 clk = ~clk;

  rsa_keysize_run #(.K(128),  .NOPS(6)) u_128  (.clk, .rst_n, .finished(fin_128),
                                                .checks(chk_128), .failures(fail_128));
  rsa_keysize_run #(.K(1024), .NOPS(2)) u_1024 (.clk, .rst_n, .finished(fin_1024),
                                                .checks(chk_1024), .failures(fail_1024));

  initial begin
    #(10 * 3 * (5 * 1024 + 20 + 1024 * 1027));
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk_128 + chk_1024, fail_128 + fail_1024 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin_128 && fin_1024);
    checks   = chk_128 + chk_1024;
    failures = fail_128 + fail_1024;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
