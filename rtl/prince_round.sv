// prince_round - one combinational PRINCE round operation.
//
// KIND selects which of the four round shapes is built:
//   RND_KEY     y = x ^ RC[RC_IDX] ^ k                      (R0, R11)
//   RND_NORMAL  y = SR(M'(S(x))) ^ RC[RC_IDX] ^ k          (R1..R5)
//   RND_MIDDLE  y = S^-1(M'(S(x)))                          (middle round)
//   RND_INVERSE y = S^-1(M'(SR^-1(x ^ RC[RC_IDX] ^ k)))     (R6..R10)
// M = SR o M' is the forward linear layer and M^-1 = M' o SR^-1 its inverse.
// The order of the steps in each shape follows the cipher's round diagrams;
// the middle round ignores k. Purely combinational, no clock.
module prince_round
  import prince_pkg::*;
#(
  parameter round_kind_t KIND   = RND_NORMAL,
  parameter int unsigned RC_IDX = 1
) (
  input  word_t x_i,
  input  word_t k_i,
  output word_t y_o
);

  always_comb begin
    unique case (KIND)
      RND_KEY:     y_o = x_i ^ RC[RC_IDX] ^ k_i;
      RND_NORMAL:  y_o = shift_rows(m_prime(sbox_layer(x_i))) ^ RC[RC_IDX] ^ k_i;
      RND_MIDDLE:  y_o = sbox_inv_layer(m_prime(sbox_layer(x_i)));
      RND_INVERSE: y_o = sbox_inv_layer(m_prime(shift_rows_inv(x_i ^ RC[RC_IDX] ^ k_i)));
      default:     y_o = x_i;
    endcase
  end

endmodule
