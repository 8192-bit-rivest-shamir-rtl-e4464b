// mont_r2: computes the Montgomery domain constant R^2 mod m, R = 2^N_BITS.
//
// Operands enter the Montgomery domain by one Montgomery multiplication with
// R^2 mod m, which depends only on the modulus. This unit finds it with
// modular doublings: x starts at 1 and is replaced 2*N_BITS times by 2x, less
// m if 2x >= m. Since x < m before each step, one subtraction is enough, so a
// step is one shift and one N_BITS+1-bit subtraction per clock. The unit is
// this design's own: it lets the host supply only the key itself.
//
// Interface: pulse start while busy is low; m must be odd, greater than 1 and
// stay stable while busy is high. done pulses for one clock 2*N_BITS clocks
// after the start clock; r2 holds its value until the next start.
module mont_r2 #(
  parameter int unsigned N_BITS = 8192
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N_BITS-1:0] m,
  output logic              busy,
  output logic              done,
  output logic [N_BITS-1:0] r2
);

  localparam int unsigned CNT = $clog2(2 * N_BITS + 1);

  logic [N_BITS-1:0] x_q;
  logic [CNT-1:0]    cnt_q;
  logic              run_q;

  logic [N_BITS:0]   dbl;
  logic [N_BITS+1:0] diff;

  always_comb begin
    dbl  = {x_q, 1'b0};
    diff = {1'b0, dbl} - (N_BITS + 2)'(m);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      cnt_q <= '0;
      run_q <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run_q) begin
        if (start) begin
          x_q   <= N_BITS'(1);
          cnt_q <= '0;
          run_q <= 1'b1;
        end
      end else begin
        // keep 2x when it is below m, otherwise 2x - m
        x_q   <= diff[N_BITS+1] ? dbl[N_BITS-1:0] : diff[N_BITS-1:0];
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == CNT'(2 * N_BITS - 1)) begin
          run_q <= 1'b0;
          done  <= 1'b1;
        end
      end
    end
  end

  assign busy = run_q;
  assign r2   = x_q;

endmodule
