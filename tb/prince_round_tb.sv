// prince_round_tb - checks the four round shapes of prince_round against
// values computed with an independent software model of PRINCE, and checks
// that an inverse round undoes a normal round using the same constant.
module prince_round_tb;
  import prince_pkg::*;

  int checks = 0, failures = 0;

  word_t x, k;
  word_t y_key, y_norm, y_mid, y_inv, y_norm_back;

  prince_round #(.KIND(RND_KEY),     .RC_IDX(11)) dut_key  (.x_i(x), .k_i(k), .y_o(y_key));
  prince_round #(.KIND(RND_NORMAL),  .RC_IDX(2))  dut_norm (.x_i(x), .k_i(k), .y_o(y_norm));
  prince_round #(.KIND(RND_MIDDLE),  .RC_IDX(0))  dut_mid  (.x_i(x), .k_i(k), .y_o(y_mid));
  prince_round #(.KIND(RND_INVERSE), .RC_IDX(7))  dut_inv  (.x_i(x), .k_i(k), .y_o(y_inv));
  // inverse round with RC2 applied to the normal round's output gives x back
  prince_round #(.KIND(RND_INVERSE), .RC_IDX(2))  dut_back (.x_i(y_norm), .k_i(k), .y_o(y_norm_back));

  typedef struct { word_t x, k, norm2, inv7, mid, key11; } vec_t;
  vec_t vecs [3] = '{
    '{64'he8e25d940ed90475, 64'h36f675cc81e74ef5, 64'h174ade4cffa23d0c, 64'he7dd04206c9f45c8, 64'ha3e36d34d206f94d, 64'h1eb801ef46421a5d},
    '{64'h1600a35a099950d8, 64'h6b0d549b6f03675a, 64'h19be27a4b54a9d29, 64'h8e469da65114d107, 64'he0eef84810025274, 64'hbda1de76afe6675f},
    '{64'h3d9c172411e20b8f, 64'h8d116ece1738f7d9, 64'had04f314a73af14a, 64'h9021cf5ecd247dd1, 64'ha96a4ffe6d722615, 64'h7021505dcfa6ac8b}
  };

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  initial begin
    foreach (vecs[i]) begin
      x = vecs[i].x;
      k = vecs[i].k;
      #1;
      check("key round RC11", y_key,  vecs[i].key11);
      check("normal round RC2", y_norm, vecs[i].norm2);
      check("middle round", y_mid, vecs[i].mid);
      check("inverse round RC7", y_inv, vecs[i].inv7);
      check("inverse undoes normal", y_norm_back, x);
    end
    for (int i = 0; i < 50; i++) begin
      x = {$urandom, $urandom};
      k = {$urandom, $urandom};
      #1;
      check("random inverse undoes normal", y_norm_back, x);
      check("random key round", y_key, x ^ k ^ 64'hC0AC29B7C97C50DD);
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
