// rsa_coprocessor: RSA encryption and decryption core for keys of up to
// KEY_BITS bits (8192 by default).
//
// RSA encryption (c = m^e mod n) and decryption (m = c^d mod n) are the same
// modular exponentiation with different exponents, so the core holds the key
// (n, e, d) in registers and feeds one rsa_modexp engine, which does the work
// with bit-level Montgomery multiplication on carry-save adders. The decrypt
// input, sampled with start, selects which exponent is used. Key generation is
// not part of the core: the host loads a ready key.
//
// Interface: key_load writes key_n, key_e and key_d when the core is idle and
// sets key_valid. start (with decrypt and data_in) begins one operation if a
// key is loaded and the core is idle; otherwise it is ignored. done pulses for
// one clock when data_out is valid; data_out holds until the next result.
// Latency is that of rsa_modexp: 4*KEY_BITS + 6 + L*(KEY_BITS + 3) clocks
// plus one for the request register, L being the bit length of the exponent
// used. The full-width ports and the key register file are this design's own
// host interface.
module rsa_coprocessor
  import rsa_pkg::*;
#(
  parameter int unsigned KEY_BITS = KEY_BITS_DEFAULT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                key_load,
  input  logic [KEY_BITS-1:0] key_n,
  input  logic [KEY_BITS-1:0] key_e,
  input  logic [KEY_BITS-1:0] key_d,
  input  logic                start,
  input  logic                decrypt,
  input  logic [KEY_BITS-1:0] data_in,
  output logic                key_valid,
  output logic                busy,
  output logic                done,
  output logic [KEY_BITS-1:0] data_out
);

  logic [KEY_BITS-1:0] n_q, e_q, d_q, din_q;
  logic                dec_q, go_q;
  logic                me_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q       <= '0;
      e_q       <= '0;
      d_q       <= '0;
      din_q     <= '0;
      dec_q     <= 1'b0;
      go_q      <= 1'b0;
      key_valid <= 1'b0;
    end else begin
      go_q <= 1'b0;
      if (!busy) begin
        if (key_load) begin
          n_q       <= key_n;
          e_q       <= key_e;
          d_q       <= key_d;
          key_valid <= 1'b1;
        end else if (start && key_valid) begin
          din_q <= data_in;
          dec_q <= decrypt;
          go_q  <= 1'b1;
        end
      end
    end
  end

  rsa_modexp #(.N_BITS(KEY_BITS)) u_modexp (
    .clk,
    .rst_n,
    .start   (go_q),
    .base    (din_q),
    .exponent(dec_q ? d_q : e_q),
    .modulus (n_q),
    .busy    (me_busy),
    .done    (done),
    .result  (data_out)
  );

  assign busy = go_q | me_busy;

endmodule
