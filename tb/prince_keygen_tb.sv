// prince_keygen_tb - checks the key generation unit: K0/K1 split, whitening
// key K0' = (K0 >>> 1) ^ (K0 >> 63) computed here by rotate and shift, and
// the key order for encryption (K0, K1, K0') and decryption (K0', K1^alpha, K0).
module prince_keygen_tb;
  import prince_pkg::*;

  int checks = 0, failures = 0;
  key_t  key;
  logic  mode;
  word_t kn0, kn1, kns;

  prince_keygen dut (.key_i(key), .mode_i(mode), .kn0_o(kn0), .kn1_o(kn1), .kns_o(kns));

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  function automatic word_t ref_kp(word_t k0);
    return ((k0 >> 1) | (k0 << 63)) ^ (k0 >> 63);
  endfunction

  initial begin
    // fixed vector: key of the reference session
    key  = 128'haaaabbbbccccddddeeeeffff00001111;
    mode = 1'b1;
    #1;
    check("enc kn0", kn0, 64'haaaabbbbccccdddd);
    check("enc kn1", kn1, 64'heeeeffff00001111);
    check("enc kns", kns, 64'hd5555ddde6666eef);
    mode = 1'b0;
    #1;
    check("dec kn0", kn0, 64'hd5555ddde6666eef);
    check("dec kn1", kn1, 64'heeeeffff00001111 ^ 64'hc0ac29b7c97c50dd);
    check("dec kns", kns, 64'haaaabbbbccccdddd);
    for (int i = 0; i < 100; i++) begin
      key  = {$urandom, $urandom, $urandom, $urandom};
      mode = i[0];
      #1;
      if (mode) begin
        check("enc kn0", kn0, key[127:64]);
        check("enc kn1", kn1, key[63:0]);
        check("enc kns", kns, ref_kp(key[127:64]));
      end else begin
        check("dec kn0", kn0, ref_kp(key[127:64]));
        check("dec kn1", kn1, key[63:0] ^ 64'hc0ac29b7c97c50dd);
        check("dec kns", kns, key[127:64]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
