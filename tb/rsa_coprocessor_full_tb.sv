// rsa_coprocessor_full_tb: one complete 8192-bit RSA encryption on the core
// with every parameter at its default.
//
// The modulus is a random odd 8192-bit number with its top bit set, the
// public exponent is 65537, the message a random value below the modulus.
// The ciphertext is compared with a left-to-right square-and-multiply
// reference whose modular products use the shift-and-add (interleaved)
// method, a different algorithm from the Montgomery hardware, and the latency with
// 4*K + 7 + 17*(K + 3) clocks (65537 has 17 bits). A private-exponent
// decryption at this size takes about 67 million clocks and is left to the
// reduced-size tests.
module rsa_coprocessor_full_tb;

  localparam int unsigned K = rsa_pkg::KEY_BITS_DEFAULT;

  logic clk = 1'b0, rst_n = 1'b0;
  logic key_load = 1'b0, start = 1'b0, decrypt = 1'b0;
  logic [K-1:0] key_n, key_e, key_d, data_in, data_out;
  logic key_valid, busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rsa_coprocessor dut (
    .clk, .rst_n, .key_load, .key_n, .key_e, .key_d, .start, .decrypt, .data_in,
    .key_valid, .busy, .done, .data_out
  );

  function automatic logic [K-1:0] rnd();
    logic [K-1:0] v;
    for (int i = 0; i < K; i += 32) v[i +: 32] = $urandom();
    return v;
  endfunction

  // (x * y) mod md by shift-and-add, x and y < md, md with its top bit free
  // of overflow thanks to the extra bit of the work registers
  function automatic logic [K-1:0] mod_mul(input logic [K-1:0] x, input logic [K-1:0] y,
                                           input logic [K-1:0] md);
    logic [K+1:0] acc;
    acc = '0;
    for (int i = K - 1; i >= 0; i--) begin
      acc = acc << 1;
      if (acc >= (K+2)'(md)) acc = acc - (K+2)'(md);
      if (y[i]) begin
        acc = acc + (K+2)'(x);
        if (acc >= (K+2)'(md)) acc = acc - (K+2)'(md);
      end
    end
    return acc[K-1:0];
  endfunction

  initial begin
    #(10 * (4 * K + 20 + 18 * (K + 3)));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] n, e, msg, exp_v;
    logic [K-1:0] acc;
    int lat, exp_lat;
    n = rnd() | 1 | (K'(1) << (K - 1));
    e = 65537;
    msg = rnd() & ~(K'(1) << (K - 1));  // below n: n has its top bit set
    key_n = '0; key_e = '0; key_d = '0; data_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    key_n = n; key_e = e; key_d = '0; key_load = 1'b1;
    @(negedge clk);
    key_load = 1'b0;
    data_in = msg; decrypt = 1'b0; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 0;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    exp_lat = 4 * K + 7 + 17 * (K + 3);
    checks++;
    if (lat != exp_lat) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, exp_lat);
    end
    acc = 1;
    for (int i = 16; i >= 0; i--) begin
      acc = mod_mul(acc, acc, n);
      if (e[i]) acc = mod_mul(acc, msg, n);
    end
    exp_v = acc;
    checks++;
    if (data_out !== exp_v) begin
      failures++;
      $display("FAIL ciphertext mismatch");
    end
    $display("8192-bit encryption, e = 65537: %0d clocks", lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
