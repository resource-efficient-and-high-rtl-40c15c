// rfid_server_tb - checks the server database side on its own: query value
// and timing, the response check (ID_S, tag authentication, seed update to
// US_S), a forged response (fail, seed kept) and a restart while waiting.
// Expected values come from an independent software model of the protocol.
module rfid_server_tb;
  import prince_pkg::*;

  localparam key_t K = 128'haaaabbbbccccddddeeeeffff00001111;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init = 0, start = 0;
  msg_t query, resp = '0;
  word_t sdata, sc1, sc2, sd2, ids, uss, seed;
  logic tag_auth, fail, done;

  rfid_server dut (
    .clk(clk), .rst_n(rst_n), .init_i(init), .start_i(start), .key_i(K),
    .seed_init_i(64'haaaaaaaaaaaaaaaa), .id_tag_i(64'hffffffffffffffff),
    .id_reader_i(64'h12345678ffffffff), .query_o(query), .resp_i(resp),
    .server_data_o(sdata), .server_cipher_o(sc1), .server_cipher2_o(sc2),
    .server_decipher2_o(sd2), .id_match_o(ids), .updated_seed_o(uss), .seed_o(seed),
    .tag_auth_o(tag_auth), .fail_o(fail), .done_o(done)
  );

  always #5 clk = ~clk;

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  task automatic start_and_query(output word_t q, output int n);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    n = 1;
    while (!query.valid && n < 50) begin @(negedge clk); n++; end
    q = query.data;
  endtask

  task automatic respond(word_t tr, output int n);
    @(negedge clk); resp = '{valid: 1'b1, data: tr};
    @(negedge clk); resp = '0;
    n = 1;
    while (!done && n < 50) begin @(negedge clk); n++; end
  endtask

  initial begin
    word_t q;
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    check("seed loaded", seed, 64'haaaaaaaaaaaaaaaa);

    start_and_query(q, n);
    check("query cycles", word_t'(n), 64'd5);
    check("SC1", q, 64'h58df97781a447af7);
    check("server data", sdata, 64'hb89efcd255555555);
    check("SC2", sc2, 64'hf50763ee4ae71fe3);
    respond(64'he2ac0e49748ca3c5, n);
    check("response cycles", word_t'(n), 64'd5);
    check("SD2", sd2, 64'he41663eeb518f10d);
    check("ID_S", ids, 64'hffffffffffffffff);
    check("tag authenticated", word_t'({tag_auth, fail}), 64'b10);
    check("US_S", uss, 64'h1be99c114ae70ef2);
    check("seed updated", seed, 64'h1be99c114ae70ef2);

    // forged response from the updated seed
    start_and_query(q, n);
    check("SC1 from updated seed", q, 64'h4153c59e2ac18e56);
    respond(64'h0123456789abcdef, n);
    check("forged response rejected", word_t'({tag_auth, fail}), 64'b01);
    check("seed kept", seed, 64'h1be99c114ae70ef2);

    // restart while waiting for the response, then a good response
    start_and_query(q, n);
    start_and_query(q, n);
    check("restart query cycles", word_t'(n), 64'd5);
    check("restart SC1", q, 64'h4153c59e2ac18e56);
    respond(64'he3a1292b85e305ae, n);
    check("after restart tag authenticated", word_t'({tag_auth, fail}), 64'b10);
    check("after restart seed", seed, 64'hf1ab4d8ebc8592d6);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
