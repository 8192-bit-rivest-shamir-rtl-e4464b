// mont_mult_tb: checks the Montgomery multiplier at N_BITS = 96.
//
// For random odd moduli (full-length ones and ones much shorter than N_BITS,
// as for a small key on a wide core), random a of any value and random b < m,
// it checks that the result is below m and that result * 2^N_BITS == a * b
// (mod m), computed with wide integer arithmetic in the testbench. It also
// checks the latency: done rises exactly N_BITS+1 clocks after start, and
// busy stays high in between. Corner cases: a = 0, b = 0, a = all ones,
// b = m-1, m = 3.
module mont_mult_tb;

  localparam int unsigned N = 96;
  localparam int unsigned NTESTS = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [N-1:0] a, b, m, result;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mont_mult #(.N_BITS(N)) dut (.clk, .rst_n, .start, .a, .b, .m, .busy, .done, .result);

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] v;
    for (int i = 0; i < N; i += 32) v[i +: 32] = $urandom();
    return v;
  endfunction

  task automatic run_one(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic [N-1:0] tm);
    logic [2*N+1:0] lhs, rhs;
    longint unsigned lat;
    @(negedge clk);
    a = ta; b = tb_; m = tm; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 0;
    a = rnd(); b = rnd();  // captured at start: must not matter now
    while (!done) begin
      if (!busy) begin
        failures++;
        $display("FAIL busy dropped before done");
      end
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != N + 1) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, N + 1);
    end
    lhs = ((2*N+2)'(result) << N) % (2*N+2)'(tm);
    rhs = ((2*N+2)'(ta) * (2*N+2)'(tb_)) % (2*N+2)'(tm);
    checks++;
    if (result >= tm || lhs != rhs) begin
      failures++;
      $display("FAIL a=%h b=%h m=%h result=%h", ta, tb_, tm, result);
    end
  endtask

  initial begin
    #(10 * (NTESTS + 10) * (N + 4));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] tm, ta, tb_;
    a = '0; b = '0; m = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    tm = rnd() | 1 | (N'(1) << (N - 1));
    run_one('0, tm - 1, tm);
    run_one('1, '0, tm);
    run_one('1, tm - 1, tm);
    run_one('1, 2, 3);
    for (int t = 0; t < NTESTS; t++) begin
      tm = rnd() | 1;
      if (t % 3 == 0) tm = tm | (N'(1) << (N - 1));
      if (t % 3 == 1) tm = tm >> ($urandom_range(1, N - 8));
      tm = tm | 1;
      if (tm == 1) tm = 3;
      ta = rnd();
      tb_ = rnd() % tm;
      run_one(ta, tb_, tm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
