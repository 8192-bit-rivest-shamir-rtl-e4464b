// rsa_modexp: modular exponentiation result = base^exponent mod modulus, the
// single operation behind both RSA encryption and decryption.
//
// The exponent is scanned right to left (least significant bit first). Two
// Montgomery multipliers work side by side: for every exponent bit mm_sq
// squares the running power S, and, when the bit is 1, mm_mul multiplies the
// accumulator A by S at the same time, so each bit costs one multiplication
// time whatever its value. The sequence, run by a small algorithmic state
// machine, is:
//   1. mont_r2 computes R^2 mod M (R = 2^N_BITS), 2*N_BITS clocks;
//   2. S = X*R mod M and A = R mod M (Montgomery forms of X and of 1), both
//      multipliers in parallel;
//   3. one loop step per exponent bit until the unscanned bits are all zero;
//   4. A*1*R^-1 mod M leaves the Montgomery domain and is the result.
// The use of Montgomery multiplication inside binary exponentiation follows
// the accelerator this core implements; right-to-left scanning with two
// multipliers, the early stop on a zero exponent tail and the on-chip R^2
// computation are this design's choices.
//
// Interface: pulse start while busy is low; base, exponent and modulus are
// captured then. modulus must be odd and greater than 1; base may be any
// value. done pulses for one clock when result is valid; result holds until
// the next start. Latency, counting the start clock as 0, is
// 4*N_BITS + 6 + L*(N_BITS + 3) clocks, where L is the bit length of the
// exponent (L = 0 for a zero exponent, which gives 1 mod M).
module rsa_modexp
  import rsa_pkg::*;
#(
  parameter int unsigned N_BITS = KEY_BITS_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N_BITS-1:0] base,
  input  logic [N_BITS-1:0] exponent,
  input  logic [N_BITS-1:0] modulus,
  output logic              busy,
  output logic              done,
  output logic [N_BITS-1:0] result
);

  modexp_state_e     state;
  logic [N_BITS-1:0] m_q, e_q, x_q, s_q, acc_q;
  logic              mul_en_q;

  // R^2 mod M
  logic              r2_start, r2_busy, r2_done;
  logic [N_BITS-1:0] r2;

  // the two multipliers
  logic              sq_start, sq_busy, sq_done;
  logic              mul_start, mul_busy, mul_done;
  logic [N_BITS-1:0] sq_a, sq_b, sq_res;
  logic [N_BITS-1:0] mul_a, mul_b, mul_res;

  logic e_zero, e_bit;
  assign e_zero = (e_q == '0);
  assign e_bit  = e_q[0];

  always_comb begin
    r2_start  = (state == ME_IDLE) && start;
    sq_start  = 1'b0;
    mul_start = 1'b0;
    sq_a      = s_q;
    sq_b      = s_q;
    mul_a     = acc_q;
    mul_b     = s_q;
    unique case (state)
      ME_R2: begin
        // X*R^2*R^-1 = X*R and R^2*1*R^-1 = R
        sq_a      = x_q;
        sq_b      = r2;
        mul_a     = r2;
        mul_b     = N_BITS'(1);
        sq_start  = r2_done;
        mul_start = r2_done;
      end
      ME_LOOP_ISSUE: begin
        if (e_zero) begin
          mul_b     = N_BITS'(1);
          mul_start = 1'b1;
        end else begin
          sq_start  = 1'b1;
          mul_start = e_bit;
        end
      end
      default: ;
    endcase
  end

  mont_r2 #(.N_BITS(N_BITS)) u_r2 (
    .clk, .rst_n, .start(r2_start), .m(m_q),
    .busy(r2_busy), .done(r2_done), .r2(r2)
  );

  mont_mult #(.N_BITS(N_BITS)) u_mm_sq (
    .clk, .rst_n, .start(sq_start), .a(sq_a), .b(sq_b), .m(m_q),
    .busy(sq_busy), .done(sq_done), .result(sq_res)
  );

  mont_mult #(.N_BITS(N_BITS)) u_mm_mul (
    .clk, .rst_n, .start(mul_start), .a(mul_a), .b(mul_b), .m(m_q),
    .busy(mul_busy), .done(mul_done), .result(mul_res)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ME_IDLE;
      m_q      <= '0;
      e_q      <= '0;
      x_q      <= '0;
      s_q      <= '0;
      acc_q    <= '0;
      mul_en_q <= 1'b0;
      done     <= 1'b0;
      result   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ME_IDLE: begin
          if (start) begin
            m_q   <= modulus;
            e_q   <= exponent;
            x_q   <= base;
            state <= ME_R2;
          end
        end
        ME_R2: begin
          if (r2_done) state <= ME_TO_MONT;
        end
        ME_TO_MONT: begin
          if (sq_done) begin
            s_q   <= sq_res;
            acc_q <= mul_res;
            state <= ME_LOOP_ISSUE;
          end
        end
        ME_LOOP_ISSUE: begin
          mul_en_q <= e_bit;
          state    <= e_zero ? ME_FROM_MONT : ME_LOOP_WAIT;
        end
        ME_LOOP_WAIT: begin
          if (sq_done) begin
            s_q <= sq_res;
            if (mul_en_q) acc_q <= mul_res;
            e_q   <= e_q >> 1;
            state <= ME_LOOP_ISSUE;
          end
        end
        ME_FROM_MONT: begin
          if (mul_done) begin
            result <= mul_res;
            done   <= 1'b1;
            state  <= ME_IDLE;
          end
        end
        default: state <= ME_IDLE;
      endcase
    end
  end

  assign busy = (state != ME_IDLE);

  // both multipliers are started together and have the same latency
  a_mm_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                                  (mul_done && state == ME_LOOP_WAIT) |-> sq_done);
  a_no_issue_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                    (sq_start |-> !sq_busy) and (mul_start |-> !mul_busy));
  a_r2_idle: assert property (@(posedge clk) disable iff (!rst_n)
                              r2_start |-> !r2_busy);

endmodule
