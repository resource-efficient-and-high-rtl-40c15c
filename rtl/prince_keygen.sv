// prince_keygen - key generation unit of the PRINCE cipher.
//
// Splits K into K0 = K[127:64] and K1 = K[63:0] and derives the whitening key
// K0' = (K0 >>> 1) ^ (K0 >> 63). It outputs the three keys the datapath uses:
// kn0 for the first key addition, kn1 for every round and kns for the last key
// addition. Encryption (mode 1) uses K0, K1, K0'. Decryption (mode 0) uses
// K0', K1 ^ alpha, K0: thanks to the reflection property of the round
// constants, the same datapath then computes the inverse cipher. The
// decryption key order is the one under which decryption inverts encryption;
// the prose description of it was not followed where it differs.
// Combinational; the outputs are loaded into the key registers on k_en.
module prince_keygen
  import prince_pkg::*;
(
  input  key_t  key_i,
  input  logic  mode_i,   // 1 = encrypt, 0 = decrypt
  output word_t kn0_o,
  output word_t kn1_o,
  output word_t kns_o
);

  word_t k0, k1;
  assign k0 = key_i[127:64];
  assign k1 = key_i[63:0];

  always_comb begin
    if (mode_i) begin
      kn0_o = k0;
      kn1_o = k1;
      kns_o = k0_prime(k0);
    end else begin
      kn0_o = k0_prime(k0);
      kn1_o = k1 ^ ALPHA;
      kns_o = k0;
    end
  end

endmodule
