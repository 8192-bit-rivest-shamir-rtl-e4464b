// rsa_keysize_run: testbench helper that runs NOPS operations with a
// full-length random exponent on an rsa_coprocessor built for K-bit keys and
// checks every result and its latency.
//
// Each operation uses a fresh random odd K-bit modulus with its top bit set,
// a random exponent with its top bit set (so the exponent loop runs all K
// steps, the worst and the typical case for a private-key operation) and a
// random message below the modulus. The reference is left-to-right
// square-and-multiply with shift-and-add modular products. The expected
// latency is 4*K + 7 + K*(K + 3) clocks. When all operations are done,
// finished rises and checks/failures hold the totals.
module rsa_keysize_run #(
  parameter int unsigned K    = 128,
  parameter int unsigned NOPS = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);

  logic key_load = 1'b0, start = 1'b0;
  logic [K-1:0] key_n, key_e, key_d, data_in, data_out;
  logic key_valid, busy, done;

  rsa_coprocessor #(.KEY_BITS(K)) dut (
    .clk, .rst_n, .key_load, .key_n, .key_e, .key_d, .start, .decrypt(1'b1), .data_in,
    .key_valid, .busy, .done, .data_out
  );

  function automatic logic [K-1:0] rnd();
    logic [K-1:0] v;
    for (int i = 0; i < K; i += 32) v[i +: 32] = $urandom();
    return v;
  endfunction

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

  function automatic logic [K-1:0] ref_pow(input logic [K-1:0] x, input logic [K-1:0] e,
                                           input logic [K-1:0] md);
    logic [K-1:0] acc;
    acc = 1;
    for (int i = K - 1; i >= 0; i--) begin
      acc = mod_mul(acc, acc, md);
      if (e[i]) acc = mod_mul(acc, x, md);
    end
    return acc;
  endfunction

  initial begin
    logic [K-1:0] n, d, msg, exp_v;
    int lat;
    finished = 1'b0;
    checks = 0;
    failures = 0;
    key_n = '0; key_e = '0; key_d = '0; data_in = '0;
    @(posedge rst_n);
    for (int op = 0; op < NOPS; op++) begin
      n   = rnd() | 1 | (K'(1) << (K - 1));
      d   = rnd() | (K'(1) << (K - 1));
      msg = rnd() & ~(K'(1) << (K - 1));
      @(negedge clk);
      key_n = n; key_e = 3; key_d = d; key_load = 1'b1;
      @(negedge clk);
      key_load = 1'b0;
      data_in = msg; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      lat = 0;
      while (!done) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat != 4 * K + 7 + K * (K + 3)) begin
        failures++;
        $display("FAIL K=%0d latency %0d, expected %0d", K, lat, 4 * K + 7 + K * (K + 3));
      end
      exp_v = ref_pow(msg, d, n);
      checks++;
      if (data_out !== exp_v) begin
        failures++;
        $display("FAIL K=%0d result mismatch in operation %0d", K, op);
      end
      $display("K=%0d operation %0d: %0d clocks", K, op, lat);
    end
    finished = 1'b1;
  end

endmodule
