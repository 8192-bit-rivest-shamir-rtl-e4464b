// carry_save_adder: one row of W full adders used as a 3:2 compressor.
//
// The three operands x, y and z are reduced to two vectors with no carry
// propagation between bit positions: sum = x ^ y ^ z keeps weight 1, carry =
// majority(x, y, z) has weight 2 and is returned unshifted, so that
// x + y + z == sum + 2*carry. The delay is that of one full adder whatever W
// is, which is what lets the Montgomery multiplier process one bit of its
// multiplier per clock at 8192 bits. Purely combinational.
module carry_save_adder #(
  parameter int unsigned W = 8195
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  always_comb begin
    sum   = x ^ y ^ z;
    carry = (x & y) | (x & z) | (y & z);
  end

endmodule
