// rsa_modexp_tb: checks modular exponentiation at N_BITS = 64.
//
// The reference is a left-to-right square-and-multiply loop on 128-bit
// integers with the % operator, a different order and arithmetic from the
// right-to-left Montgomery hardware. Cases: exponent 0, 1, 2, 3, 65537, all
// ones, random exponents of random bit length; bases 0, 1, m-1, >= m and
// random; moduli of full and of reduced length. It also checks the latency
// 4*N + 6 + L*(N + 3) clocks, L being the exponent's bit length.
module rsa_modexp_tb;

  localparam int unsigned N = 64;
  localparam int unsigned NTESTS = 150;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [N-1:0] base, exponent, modulus, result;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rsa_modexp #(.N_BITS(N)) dut (.clk, .rst_n, .start, .base, .exponent, .modulus,
                                .busy, .done, .result);

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] v;
    for (int i = 0; i < N; i += 32) v[i +: 32] = $urandom();
    return v;
  endfunction

  function automatic logic [N-1:0] ref_pow(input logic [N-1:0] x, input logic [N-1:0] e,
                                           input logic [N-1:0] md);
    logic [2*N-1:0] acc, xx;
    acc = (2*N)'(1) % (2*N)'(md);
    xx  = (2*N)'(x) % (2*N)'(md);
    for (int i = N - 1; i >= 0; i--) begin
      acc = (acc * acc) % (2*N)'(md);
      if (e[i]) acc = (acc * xx) % (2*N)'(md);
    end
    return acc[N-1:0];
  endfunction

  function automatic int bitlen(input logic [N-1:0] e);
    for (int i = N - 1; i >= 0; i--) if (e[i]) return i + 1;
    return 0;
  endfunction

  task automatic run_one(input logic [N-1:0] x, input logic [N-1:0] e, input logic [N-1:0] md);
    logic [N-1:0] exp_v;
    int lat, exp_lat;
    @(negedge clk);
    base = x; exponent = e; modulus = md; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    base = rnd(); exponent = rnd(); modulus = rnd();  // captured at start
    lat = 0;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    exp_lat = 4 * N + 6 + bitlen(e) * (N + 3);
    checks++;
    if (lat != exp_lat) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, exp_lat);
    end
    exp_v = ref_pow(x, e, md);
    checks++;
    if (result !== exp_v) begin
      failures++;
      $display("FAIL x=%h e=%h m=%h result=%h expected %h", x, e, md, result, exp_v);
    end
  endtask

  initial begin
    #(10 * (NTESTS + 20) * (5 * N + 10 + N * (N + 2)));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] md, x, e;
    base = '0; exponent = '0; modulus = 3;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    md = rnd() | 1 | (N'(1) << (N - 1));
    run_one(rnd(), 0, md);
    run_one(rnd(), 1, md);
    run_one(rnd(), 2, md);
    run_one(rnd(), 3, md);
    run_one(rnd(), 65537, md);
    run_one(rnd(), '1, md);
    run_one(0, rnd(), md);
    run_one(1, rnd(), md);
    run_one(md - 1, rnd(), md);
    run_one('1, rnd(), md);
    run_one(2, 7, 3233);
    for (int t = 0; t < NTESTS; t++) begin
      md = rnd();
      if (t % 2 == 0) md = md | (N'(1) << (N - 1));
      else md = md >> $urandom_range(1, N - 4);
      md = md | 1;
      if (md == 1) md = 3;
      x = rnd();
      e = rnd() >> $urandom_range(0, N - 1);
      run_one(x, e, md);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
