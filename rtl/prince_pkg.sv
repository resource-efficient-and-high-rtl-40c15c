// prince_pkg - types, constants and layer functions shared by the PRINCE
// cipher and the RFID mutual-authentication modules.
//
// PRINCE is a 64-bit block cipher with a 128-bit key K = K0 || K1. Its state
// is 16 nibbles; nibble 0 is the most significant one (bits 63:60). The
// package holds the round constants RC0..RC11, the reflection constant alpha,
// the 4-bit S-box and its inverse, the shift-rows nibble permutation and its
// inverse, and the involutive linear layer M'. The round structure, the
// S-boxes, the shift-rows maps and the constants follow the PRINCE cipher as
// published; the matrix M' is PRINCE's block-diagonal diag(M0^, M1^, M1^, M0^).
// Everything here is combinational and synthesizable.
package prince_pkg;

  localparam int unsigned BLOCK_W = 64;
  localparam int unsigned KEY_W   = 128;

  typedef logic [BLOCK_W-1:0] word_t;
  typedef logic [KEY_W-1:0]   key_t;

  // Reflection constant: RC[i] ^ RC[11-i] == ALPHA for every i.
  localparam word_t ALPHA = 64'hC0AC29B7C97C50DD;

  localparam word_t RC [12] = '{
    64'h0000000000000000, 64'h13198A2E03707344, 64'hA4093822299F31D0,
    64'h082EFA98EC4E6C89, 64'h452821E638D01377, 64'hBE5466CF34E90C6C,
    64'h7EF84F78FD955CB1, 64'h85840851F1AC43AA, 64'hC882D32F25323C54,
    64'h64A51195E0E3610D, 64'hD3B5A399CA0C2399, 64'hC0AC29B7C97C50DD
  };

  localparam logic [3:0] SBOX [16] = '{
    4'hB, 4'hF, 4'h3, 4'h2, 4'hA, 4'hC, 4'h9, 4'h1,
    4'h6, 4'h7, 4'h8, 4'h0, 4'hE, 4'h5, 4'hD, 4'h4
  };
  localparam logic [3:0] SBOX_INV [16] = '{
    4'hB, 4'h7, 4'h3, 4'h2, 4'hF, 4'hD, 4'h8, 4'h9,
    4'hA, 4'h6, 4'h4, 4'h0, 4'h5, 4'hE, 4'hC, 4'h1
  };

  // Shift rows: output nibble i takes input nibble SR[i].
  localparam int unsigned SR     [16] = '{0, 5, 10, 15, 4, 9, 14, 3, 8, 13, 2, 7, 12, 1, 6, 11};
  localparam int unsigned SR_INV [16] = '{0, 13, 10, 7, 4, 1, 14, 11, 8, 5, 2, 15, 12, 9, 6, 3};

  // Kinds of round operation in the datapath.
  typedef enum logic [1:0] {
    RND_KEY     = 2'd0,  // x ^ RC ^ k           (R0 and R11)
    RND_NORMAL  = 2'd1,  // S, M, RC add, key add (R1..R5)
    RND_MIDDLE  = 2'd2,  // S, M', inverse S      (middle round)
    RND_INVERSE = 2'd3   // key add, RC add, M^-1, inverse S (R6..R10)
  } round_kind_t;

  // States of the cipher's controller (control register c_reg).
  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,
    ST_S0   = 3'd1,
    ST_S1   = 3'd2,
    ST_S2   = 3'd3,
    ST_SU   = 3'd4
  } ctrl_state_t;

  // One protocol message between server, reader and tag.
  typedef struct packed {
    logic  valid;  // one-cycle pulse
    word_t data;
  } msg_t;

  // Values of one authentication session, named after the protocol's terms.
  typedef struct packed {
    word_t server_data;         // S ^ ID_R, input of the query encryption
    word_t server_cipher;       // SC1 = E(S ^ ID_R)
    word_t server_decipher1;    // SD1 = D(SC1), at the reader
    word_t reader_cipher;       // R_C = E(SD1 ^ ID_R)
    word_t tag_cipher;          // T_C = E(S)
    word_t tag_response;        // T_R = E(US_T ^ ID_T)
    word_t server_decipher2;    // SD2 = D(T_R)
    word_t server_cipher2;      // SC2 = E(S)
    word_t id_match;            // ID_S = K1 ^ SC2 ^ SD2
    word_t updated_seed_tag;    // US_T = R_C ^ K1
    word_t updated_seed_server; // US_S = SC2 ^ K1
  } map_obs_t;

  function automatic logic [3:0] get_nib(word_t x, int unsigned i);
    return x[63 - 4*i -: 4];
  endfunction

  // Table lookups written as selects over the constant tables, so that
  // synthesis builds each S-box as 4-input logic rather than a ROM.
  function automatic logic [3:0] sbox4(logic [3:0] a);
    logic [3:0] y;
    y = '0;
    for (int unsigned v = 0; v < 16; v++) if (a == 4'(v)) y = SBOX[v];
    return y;
  endfunction

  function automatic logic [3:0] sbox4_inv(logic [3:0] a);
    logic [3:0] y;
    y = '0;
    for (int unsigned v = 0; v < 16; v++) if (a == 4'(v)) y = SBOX_INV[v];
    return y;
  endfunction

  function automatic word_t sbox_layer(word_t x);
    word_t y;
    for (int unsigned i = 0; i < 16; i++) y[63 - 4*i -: 4] = sbox4(get_nib(x, i));
    return y;
  endfunction

  function automatic word_t sbox_inv_layer(word_t x);
    word_t y;
    for (int unsigned i = 0; i < 16; i++) y[63 - 4*i -: 4] = sbox4_inv(get_nib(x, i));
    return y;
  endfunction

  function automatic word_t shift_rows(word_t x);
    word_t y;
    for (int unsigned i = 0; i < 16; i++) y[63 - 4*i -: 4] = get_nib(x, SR[i]);
    return y;
  endfunction

  function automatic word_t shift_rows_inv(word_t x);
    word_t y;
    for (int unsigned i = 0; i < 16; i++) y[63 - 4*i -: 4] = get_nib(x, SR_INV[i]);
    return y;
  endfunction

  // 16x16 matrix M^(k): 4x4 blocks, block (r,c) is the identity with
  // diagonal entry (r+c+k) mod 4 cleared. Bit 0 of the chunk is its MSB.
  function automatic logic [15:0] m_hat(logic [15:0] x, int unsigned k);
    logic [15:0] y;
    for (int unsigned j = 0; j < 16; j++) begin
      logic v;
      v = 1'b0;
      for (int unsigned c = 0; c < 4; c++)
        if ((j % 4) != ((j / 4 + c + k) % 4)) v ^= x[15 - (4*c + j % 4)];
      y[15 - j] = v;
    end
    return y;
  endfunction

  // M' = diag(M^(0), M^(1), M^(1), M^(0)); an involution.
  function automatic word_t m_prime(word_t x);
    return {m_hat(x[63:48], 0), m_hat(x[47:32], 1), m_hat(x[31:16], 1), m_hat(x[15:0], 0)};
  endfunction

  // K0' = (K0 >>> 1) ^ (K0 >> 63)
  function automatic word_t k0_prime(word_t k0);
    return {k0[0], k0[63:2], k0[1] ^ k0[63]};
  endfunction

endpackage
