// mont_r2_tb: checks the R^2 mod m unit at N_BITS = 80 against
// 2^(2*N_BITS) mod m computed with wide integer arithmetic, for random odd
// moduli of full and of reduced length and for m = 3 and m = 2^N_BITS - 1.
// It also checks that done rises exactly 2*N_BITS clocks after start.
module mont_r2_tb;

  localparam int unsigned N = 80;
  localparam int unsigned NTESTS = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [N-1:0] m, r2;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mont_r2 #(.N_BITS(N)) dut (.clk, .rst_n, .start, .m, .busy, .done, .r2);

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] v;
    for (int i = 0; i < N; i += 32) v[i +: 32] = $urandom();
    return v;
  endfunction

  task automatic run_one(input logic [N-1:0] tm);
    logic [2*N:0] ref_v;
    int lat;
    @(negedge clk);
    m = tm; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 0;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != 2 * N) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, 2 * N);
    end
    ref_v = ((2*N+1)'(1) << (2 * N)) % (2*N+1)'(tm);
    checks++;
    if ((2*N+1)'(r2) != ref_v) begin
      failures++;
      $display("FAIL m=%h r2=%h expected %h", tm, r2, ref_v);
    end
  endtask

  initial begin
    #(10 * (NTESTS + 10) * (2 * N + 4));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] tm;
    m = 3;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_one(3);
    run_one('1);
    for (int t = 0; t < NTESTS; t++) begin
      tm = rnd();
      if (t % 2 == 0) tm = tm | (N'(1) << (N - 1));
      else tm = tm >> $urandom_range(1, N - 4);
      tm = tm | 1;
      if (tm == 1) tm = 3;
      run_one(tm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
