// prince_cipher_tb - end-to-end test of the PRINCE cipher.
// Encrypts the published PRINCE test vectors, the vectors of the reference
// authentication session and vectors from an independent software model,
// decrypts every result back, checks that done comes exactly four cycles
// after start, runs back-to-back operations with random data (decryption must
// return the plaintext) and checks that a start while busy is ignored.
module prince_cipher_tb;
  import prince_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, mode = 1;
  key_t key = '0;
  word_t pt = '0, ct;
  logic done, busy;

  prince_cipher dut (.clk(clk), .rst_n(rst_n), .start_i(start), .mode_i(mode),
                     .key_i(key), .pt_i(pt), .ct_o(ct), .done_o(done), .busy_o(busy));

  always #5 clk = ~clk;

  typedef struct { key_t k; word_t p; word_t c; } vec_t;
  vec_t vecs [14] = '{
    // published PRINCE test vectors (K = K0 || K1)
    '{128'h0, 64'h0000000000000000, 64'h818665aa0d02dfda},
    '{128'h0, 64'hffffffffffffffff, 64'h604ae6ca03c20ada},
    '{{64'hffffffffffffffff, 64'h0}, 64'h0, 64'h9fb51935fc3df524},
    '{{64'h0, 64'hffffffffffffffff}, 64'h0, 64'h78a54cbe737bb7ef},
    '{{64'h0, 64'hfedcba9876543210}, 64'h0123456789abcdef, 64'hae25ad3ca8fa9ccf},
    // reference authentication session: E(S), E(S ^ ID_R), E(US_T ^ ID_T)
    '{128'haaaabbbbccccddddeeeeffff00001111, 64'haaaaaaaaaaaaaaaa, 64'hf50763ee4ae71fe3},
    '{128'haaaabbbbccccddddeeeeffff00001111, 64'hb89efcd255555555, 64'h58df97781a447af7},
    '{128'haaaabbbbccccddddeeeeffff00001111, 64'he41663eeb518f10d, 64'he2ac0e49748ca3c5},
    // software model
    '{128'hf28c105d1fb17c2390c192cfd3ac94af, 64'h0f21ddb66cad4a26, 64'h3607b67660fc22af},
    '{128'h0fd630f1f29d0da9953f48f1a09f76b5, 64'ha170b33839263059, 64'hf526729b7df26f40},
    '{128'h3898d190f9ebdacc0cb1e29c658cda14, 64'h95e60af593bd04cf, 64'h3227824add5c1995},
    '{128'h6b4cb2424a23d5962217beaddbc496cb, 64'h8e81973e0becd7b0, 64'hca4730ba8bf7d0a8},
    '{128'h8f6d05584ef8aa38922766581e27a1c0, 64'h8a6a63ec24ede6a4, 64'h960ee17600ff0c77},
    '{128'h923a736994e3bf911a61dbe22e44158b, 64'hae97ba94d0eda82f, 64'h367478163353113c}
  };

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  // Run one operation; returns the result and checks the 4-cycle latency.
  task automatic run(input logic m, input key_t k, input word_t d, output word_t res);
    int n;
    @(negedge clk);
    start = 1; mode = m; key = k; pt = d;
    @(negedge clk);
    start = 0; mode = ~m; key = ~k; pt = ~d;  // inputs need not be held
    n = 1;
    while (!done && n < 20) begin
      @(negedge clk);
      n++;
    end
    res = ct;
    check("latency start->done", word_t'(n), 64'd4);
  endtask

  initial begin
    word_t r, r2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (vecs[i]) begin
      run(1'b1, vecs[i].k, vecs[i].p, r);
      check($sformatf("encrypt vector %0d", i), r, vecs[i].c);
      run(1'b0, vecs[i].k, vecs[i].c, r2);
      check($sformatf("decrypt vector %0d", i), r2, vecs[i].p);
    end
    // start while busy is ignored
    begin
      @(negedge clk);
      start = 1; mode = 1; key = vecs[5].k; pt = vecs[5].p;
      @(negedge clk);
      start = 1; key = '0; pt = '1;          // busy: must be ignored
      @(negedge clk);
      start = 0;
      @(negedge clk); @(negedge clk);
      checks++;
      if (!done) begin failures++; $display("FAIL done missing after busy start"); end
      check("result unaffected by start while busy", ct, vecs[5].c);
      @(negedge clk);
      checks++;
      if (done || busy) begin failures++; $display("FAIL busy start was accepted"); end
    end
    // random round trips, back to back
    for (int i = 0; i < 40; i++) begin
      key_t k;
      word_t p;
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom};
      run(1'b1, k, p, r);
      run(1'b0, k, r, r2);
      check("random round trip", r2, p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
