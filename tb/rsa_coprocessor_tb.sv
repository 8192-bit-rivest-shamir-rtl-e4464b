// rsa_coprocessor_tb: end-to-end test of the RSA core at KEY_BITS = 64.
//
// Key 1 is the textbook pair n = 61*53 = 3233, e = 17, d = 2753. Key 2 is
// built here from the primes 2^32-5 and 2^32-17: n = p*q, e the first of
// 65537, 17, 5, 3 prime to (p-1)(q-1), d its inverse found with the extended
// Euclidean algorithm. For each key, random messages are encrypted, the
// ciphertext is compared with a square-and-multiply reference, decrypted
// again and compared with the message. The test also covers a start before
// any key is loaded (must be ignored), key_load and start while busy (must be
// ignored), a message >= n, and the latency 4*K + 7 + L*(K + 3) clocks from
// the start clock to done. It counts how often each mechanism of the core
// occurred (encrypt, decrypt, a loop step with and without the multiply,
// the multiplier's final subtraction taken and not taken, the loop ending
// before the exponent's top bit) and fails if one never did.
module rsa_coprocessor_tb;

  localparam int unsigned K = 64;
  localparam int unsigned NMSG = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic key_load = 1'b0, start = 1'b0, decrypt = 1'b0;
  logic [K-1:0] key_n, key_e, key_d, data_in, data_out;
  logic key_valid, busy, done;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_enc = 0, n_dec = 0, n_step_mul = 0, n_step_sq_only = 0;
  int n_sub_taken = 0, n_sub_not_taken = 0, n_early_stop = 0;
  int n_ignored_start = 0, n_ignored_key = 0;

  always #5 clk = ~clk;

  rsa_coprocessor #(.KEY_BITS(K)) dut (
    .clk, .rst_n, .key_load, .key_n, .key_e, .key_d, .start, .decrypt, .data_in,
    .key_valid, .busy, .done, .data_out
  );

  // observe the engine's internal events
  always @(posedge clk) if (rst_n) begin
    if (dut.u_modexp.state == rsa_pkg::ME_LOOP_ISSUE && dut.u_modexp.e_q != '0) begin
      if (dut.u_modexp.e_q[0]) n_step_mul++;
      else n_step_sq_only++;
    end
    if (dut.u_modexp.u_mm_sq.state == 2'd2) begin
      if (dut.u_modexp.u_mm_sq.t_diff[K+2]) n_sub_not_taken++;
      else n_sub_taken++;
    end
  end

  function automatic logic [K-1:0] ref_pow(input logic [K-1:0] x, input logic [K-1:0] e,
                                           input logic [K-1:0] md);
    logic [2*K-1:0] acc, xx;
    acc = (2*K)'(1) % (2*K)'(md);
    xx  = (2*K)'(x) % (2*K)'(md);
    for (int i = K - 1; i >= 0; i--) begin
      acc = (acc * acc) % (2*K)'(md);
      if (e[i]) acc = (acc * xx) % (2*K)'(md);
    end
    return acc[K-1:0];
  endfunction

  function automatic int bitlen(input logic [K-1:0] e);
    for (int i = K - 1; i >= 0; i--) if (e[i]) return i + 1;
    return 0;
  endfunction

  // modular inverse of a mod md (gcd must be 1), signed 2K-bit arithmetic
  function automatic logic [K-1:0] mod_inv(input logic [K-1:0] a, input logic [K-1:0] md);
    logic signed [2*K+1:0] r0, r1, t0, t1, qq, tmp;
    r0 = (2*K+2)'(md); r1 = (2*K+2)'(a); t0 = 0; t1 = 1;
    while (r1 != 0) begin
      qq = r0 / r1;
      tmp = r0 - qq * r1; r0 = r1; r1 = tmp;
      tmp = t0 - qq * t1; t0 = t1; t1 = tmp;
    end
    if (t0 < 0) t0 = t0 + (2*K+2)'(md);
    return t0[K-1:0];
  endfunction

  task automatic load_key(input logic [K-1:0] n, input logic [K-1:0] e, input logic [K-1:0] d);
    @(negedge clk);
    key_n = n; key_e = e; key_d = d; key_load = 1'b1;
    @(negedge clk);
    key_load = 1'b0;
    checks++;
    if (!key_valid || dut.n_q != n) begin
      failures++;
      $display("FAIL key not loaded");
    end
  endtask

  task automatic run_op(input logic dec, input logic [K-1:0] x, output logic [K-1:0] y);
    logic [K-1:0] e_used, exp_v;
    int lat, exp_lat;
    bit poked;
    e_used = dec ? dut.d_q : dut.e_q;
    @(negedge clk);
    data_in = x; decrypt = dec; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    data_in = '0;
    lat = 0;
    poked = 0;
    while (!done) begin
      if (!poked && lat == 10) begin
        // requests while busy must have no effect
        key_load = 1'b1; key_n = 3; start = 1'b1; decrypt = !dec;
        poked = 1;
        n_ignored_key++;
      end else begin
        key_load = 1'b0; start = 1'b0;
      end
      @(negedge clk);
      lat++;
    end
    key_load = 1'b0; start = 1'b0;
    if (dec) n_dec++; else n_enc++;
    if (bitlen(e_used) < K) n_early_stop++;
    exp_lat = 4 * K + 7 + bitlen(e_used) * (K + 3);
    checks++;
    if (lat != exp_lat) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, exp_lat);
    end
    exp_v = ref_pow(x, e_used, dut.n_q);
    checks++;
    if (data_out !== exp_v) begin
      failures++;
      $display("FAIL %s x=%h result=%h expected %h", dec ? "dec" : "enc", x, data_out, exp_v);
    end
    y = data_out;
  endtask

  task automatic round_trips(input logic [K-1:0] n, input int count);
    logic [K-1:0] msg, ct, pt;
    for (int i = 0; i < count; i++) begin
      msg = {$urandom(), $urandom()} % n;
      run_op(1'b0, msg, ct);
      run_op(1'b1, ct, pt);
      checks++;
      if (pt !== msg) begin
        failures++;
        $display("FAIL round trip msg=%h ct=%h pt=%h", msg, ct, pt);
      end
    end
  endtask

  task automatic expect_count(input string what, input int cnt);
    checks++;
    $display("mechanism %-28s %0d", what, cnt);
    if (cnt == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    #(10 * (4 * NMSG + 20) * (5 * K + 10 + K * (K + 3)));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] p, q, n, phi, e, d, y;
    key_n = '0; key_e = '0; key_d = '0; data_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // start with no key: ignored
    @(negedge clk);
    start = 1'b1; data_in = 5;
    @(negedge clk);
    start = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    n_ignored_start++;
    if (busy || done || key_valid) begin
      failures++;
      $display("FAIL start without a key was not ignored");
    end

    // key 1: textbook pair
    load_key(3233, 17, 2753);
    run_op(1'b0, 65, y);
    checks++;
    if (y != 2790) begin
      failures++;
      $display("FAIL 65^17 mod 3233 = %0d, expected 2790", y);
    end
    run_op(1'b1, 2790, y);
    checks++;
    if (y != 65) begin
      failures++;
      $display("FAIL 2790^2753 mod 3233 = %0d, expected 65", y);
    end
    run_op(1'b0, 3233 + 65, y);  // message above n is reduced first
    checks++;
    if (y != 2790) begin
      failures++;
      $display("FAIL (n+65)^17 mod n = %0d", y);
    end
    round_trips(3233, NMSG / 4);

    // key 2: 64-bit modulus
    p = 64'd4294967291;
    q = 64'd4294967279;
    n = p * q;
    phi = (p - 1) * (q - 1);
    e = 65537;
    if (phi % 65537 == 0) e = 17;
    if (phi % e == 0) e = 5;
    d = mod_inv(e, phi);
    checks++;
    if (((128)'(e) * (128)'(d)) % (128)'(phi) != 1) begin
      failures++;
      $display("FAIL testbench key: e*d mod phi != 1");
    end
    load_key(n, e, d);
    round_trips(n, NMSG);

    expect_count("encrypt", n_enc);
    expect_count("decrypt", n_dec);
    expect_count("loop step with multiply", n_step_mul);
    expect_count("loop step, square only", n_step_sq_only);
    expect_count("final subtraction taken", n_sub_taken);
    expect_count("final subtraction skipped", n_sub_not_taken);
    expect_count("early loop stop", n_early_stop);
    expect_count("start without key ignored", n_ignored_start);
    expect_count("requests while busy ignored", n_ignored_key);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
