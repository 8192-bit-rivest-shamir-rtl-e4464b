// carry_save_adder_tb: checks the 3:2 compressor row against integer
// addition. For random and corner operands (all zeros, all ones) it checks
// x + y + z == sum + 2*carry over W+1 bits and, bit by bit, that sum and carry
// are the full-adder outputs. W = 130 covers a width that is not a multiple
// of the 64-bit simulation word. Purely combinational: no clock, the watchdog
// counts delta-free steps of 1 time unit.
module carry_save_adder_tb;

  localparam int unsigned W = 130;

  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  carry_save_adder #(.W(W)) dut (.x, .y, .z, .sum(s), .carry(c));

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom();
    return v;
  endfunction

  task automatic check_once();
    logic [W+1:0] lhs, rhs;
    int bad;
    #1;
    lhs = (W+2)'(x) + (W+2)'(y) + (W+2)'(z);
    rhs = (W+2)'(s) + ((W+2)'(c) << 1);
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("FAIL sum: x+y+z=%h sum+2c=%h", lhs, rhs);
    end
    bad = 0;
    for (int i = 0; i < W; i++) begin
      if (s[i] != (x[i] ^ y[i] ^ z[i])) bad++;
      if (c[i] != ((int'(x[i]) + int'(y[i]) + int'(z[i])) >= 2)) bad++;
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL bitwise: %0d wrong bits", bad);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0; y = '0; z = '0; check_once();
    x = '1; y = '1; z = '1; check_once();
    x = '1; y = '0; z = '1; check_once();
    for (int t = 0; t < 500; t++) begin
      x = rnd(); y = rnd(); z = rnd();
      check_once();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
