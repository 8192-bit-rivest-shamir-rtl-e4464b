// mont_mult: radix-2, bit-level Montgomery modular multiplier with the
// partial result kept in carry-save form.
//
// Computes result = a * b * 2^-N_BITS mod m for an odd modulus m. The
// multiplier a is shifted out one bit per clock, least significant bit first.
// Each clock adds a_i*b to the partial result T = S + C, then adds q*m, where
// q = parity of (S + C + a_i*b), so that the sum is even, and halves it.
// Both additions are rows of carry-save adders, so the clock period does not
// depend on N_BITS. Because T < 2m holds before and after every step, the
// registers need only N_BITS+2 bits. After N_BITS steps one extra clock turns
// S + C into a binary number with a single carry-propagate adder and
// subtracts m once if the sum is at least m, so the result is always < m.
// The carry rows are one bit wider than the registers; by the T < 2m bound
// their top carry bits are always zero and are dropped, which lint reports as
// unused bits.
//
// The bit-level, carry-save Montgomery method is the one this accelerator is
// built on; the cycle structure, the final reduction clock and the handshake
// are this design's own choices.
//
// Interface: pulse start for one clock while busy is low; a and b are
// captured then (b must be < m, a may be any N_BITS-bit value). m is not
// captured and must stay stable while busy is high. done pulses for one clock
// N_BITS+1 clocks after the start clock; result holds until the next start.
module mont_mult #(
  parameter int unsigned N_BITS = 8192
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N_BITS-1:0] a,
  input  logic [N_BITS-1:0] b,
  input  logic [N_BITS-1:0] m,
  output logic              busy,
  output logic              done,
  output logic [N_BITS-1:0] result
);

  localparam int unsigned RW  = N_BITS + 2;  // S and C registers
  localparam int unsigned XW  = N_BITS + 3;  // carry-save rows
  localparam int unsigned CNT = $clog2(N_BITS + 1);

  typedef enum logic [1:0] {MM_IDLE, MM_RUN, MM_FINAL} mm_state_e;

  mm_state_e         state;
  logic [RW-1:0]     s_q, c_q;
  logic [N_BITS-1:0] a_q, b_q;
  logic [CNT-1:0]    cnt_q;

  // one carry-save iteration
  logic [XW-1:0] ab, qm, s1, c1, s2, c2;
  logic          q;

  always_comb begin
    ab = a_q[0] ? XW'(b_q) : XW'(0);
    q  = s_q[0] ^ c_q[0] ^ ab[0];
    qm = q ? XW'(m) : XW'(0);
  end

  carry_save_adder #(.W(XW)) u_csa_ab (
    .x(XW'(s_q)), .y(XW'(c_q)), .z(ab), .sum(s1), .carry(c1)
  );

  carry_save_adder #(.W(XW)) u_csa_qm (
    .x(s1), .y({c1[XW-2:0], 1'b0}), .z(qm), .sum(s2), .carry(c2)
  );

  // final carry-propagate addition and single conditional subtraction
  logic [RW-1:0] t_sum;
  logic [RW:0]   t_diff;

  always_comb begin
    t_sum  = s_q + c_q;
    t_diff = {1'b0, t_sum} - (RW + 1)'(m);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= MM_IDLE;
      s_q    <= RW'(0);
      c_q    <= RW'(0);
      a_q    <= '0;
      b_q    <= '0;
      cnt_q  <= '0;
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        MM_IDLE: begin
          if (start) begin
            s_q   <= RW'(0);
            c_q   <= RW'(0);
            a_q   <= a;
            b_q   <= b;
            cnt_q <= '0;
            state <= MM_RUN;
          end
        end
        MM_RUN: begin
          // s2 is even by the choice of q: drop its zero LSB
          s_q   <= s2[RW:1];
          c_q   <= c2[RW-1:0];
          a_q   <= a_q >> 1;
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == CNT'(N_BITS - 1)) state <= MM_FINAL;
        end
        MM_FINAL: begin
          result <= t_diff[RW] ? t_sum[N_BITS-1:0] : t_diff[N_BITS-1:0];
          done   <= 1'b1;
          state  <= MM_IDLE;
        end
        default: state <= MM_IDLE;
      endcase
    end
  end

  assign busy = (state != MM_IDLE);

  // the quotient bit must make the sum even in every step
  a_even_step: assert property (@(posedge clk) disable iff (!rst_n)
                                (state == MM_RUN) |-> (s2[0] == 1'b0));
  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                    done |-> !busy);

endmodule
