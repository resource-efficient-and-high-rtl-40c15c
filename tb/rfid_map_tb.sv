// rfid_map_tb - end-to-end test of the RFID mutual authentication system at
// its only (default) configuration.
//
// Session 1 replays the reference session (K = aaaabbbb..00001111,
// S = aaaa..aa, ID_T = ffff..ff, ID_R = 12345678ffffffff) and compares every
// observed value with values from an independent software model. Session 2
// must succeed from the updated seed. Session 3 gives the database a wrong
// tag ID (tag authentication fails, the seeds desynchronize); session 4 then
// fails reader authentication at the tag. Session 5 re-initializes the seeds,
// session 6 uses a reader with a wrong key. Each mechanism (reader
// authenticated / rejected, tag authenticated / rejected, seed update, sync,
// re-initialization, server restart) is counted and must happen at least once.
module rfid_map_tb;
  import prince_pkg::*;

  localparam key_t  K    = 128'haaaabbbbccccddddeeeeffff00001111;
  localparam word_t S0   = 64'haaaaaaaaaaaaaaaa;
  localparam word_t IDT  = 64'hffffffffffffffff;
  localparam word_t IDR  = 64'h12345678ffffffff;
  localparam int    SESSION_CYCLES = 27;

  int checks = 0, failures = 0;
  int n_reader_ok = 0, n_reader_rej = 0, n_tag_ok = 0, n_tag_rej = 0;
  int n_seed_upd = 0, n_sync = 0, n_init = 0, n_restart = 0;

  logic clk = 0, rst_n = 0, init = 0, start = 0;
  key_t key_srv = K, key_rdr = K, key_tag = K;
  word_t seed = S0, id_tag_srv = IDT, id_tag = IDT, id_rdr_srv = IDR, id_rdr = IDR;
  map_obs_t obs;
  logic reader_auth, tag_auth, sync_done, session_done;
  word_t seed_tag, seed_srv;
  logic  s4_server_left_waiting;

  rfid_map dut (
    .clk(clk), .rst_n(rst_n), .init_i(init), .start_i(start),
    .key_server_i(key_srv), .key_reader_i(key_rdr), .key_tag_i(key_tag),
    .seed_i(seed), .id_tag_server_i(id_tag_srv), .id_tag_i(id_tag),
    .id_reader_server_i(id_rdr_srv), .id_reader_i(id_rdr),
    .obs_o(obs), .reader_auth_o(reader_auth), .tag_auth_o(tag_auth),
    .sync_done_o(sync_done), .session_done_o(session_done),
    .seed_tag_o(seed_tag), .seed_server_o(seed_srv)
  );

  always #5 clk = ~clk;

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  task automatic do_init();
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    n_init++;
  endtask

  // Start a session and wait for session_done; returns the cycle count.
  task automatic session(output int cycles);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!session_done && cycles < 200) begin
      @(negedge clk);
      cycles++;
    end
    if (reader_auth) n_reader_ok++; else n_reader_rej++;
    if (tag_auth) n_tag_ok++;
    else if (reader_auth) n_tag_rej++;
    if (sync_done) n_sync++;
  endtask

  task automatic check_obs(string s, word_t sd, word_t sc1, word_t sd1, word_t rc, word_t tc,
                           word_t tr, word_t sd2, word_t sc2, word_t ids, word_t ust, word_t uss);
    check({s, " Server_data"}, obs.server_data, sd);
    check({s, " Server_cipher"}, obs.server_cipher, sc1);
    check({s, " Server_decipher1"}, obs.server_decipher1, sd1);
    check({s, " Reader_cipher"}, obs.reader_cipher, rc);
    check({s, " Tag_cipher"}, obs.tag_cipher, tc);
    check({s, " Tag_response"}, obs.tag_response, tr);
    check({s, " Server_decipher2"}, obs.server_decipher2, sd2);
    check({s, " Server_cipher2"}, obs.server_cipher2, sc2);
    check({s, " ID_match"}, obs.id_match, ids);
    check({s, " Updated_Seed_Tag"}, obs.updated_seed_tag, ust);
    check({s, " Updated_Seed_server"}, obs.updated_seed_server, uss);
  endtask

  task automatic check_flags(string s, logic ra, logic ta, logic sy);
    check({s, " Reader_Auth"}, word_t'(reader_auth), word_t'(ra));
    check({s, " Tag_Auth"}, word_t'(tag_auth), word_t'(ta));
    check({s, " Sync_Done"}, word_t'(sync_done), word_t'(sy));
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do_init();

    // 1: reference session
    session(cyc);
    check("session 1 cycles", word_t'(cyc), word_t'(SESSION_CYCLES));
    check_obs("s1", 64'hb89efcd255555555, 64'h58df97781a447af7, 64'hb89efcd255555555,
              64'hf50763ee4ae71fe3, 64'hf50763ee4ae71fe3, 64'he2ac0e49748ca3c5,
              64'he41663eeb518f10d, 64'hf50763ee4ae71fe3, 64'hffffffffffffffff,
              64'h1be99c114ae70ef2, 64'h1be99c114ae70ef2);
    check_flags("s1", 1, 1, 1);
    check("s1 tag seed", seed_tag, 64'h1be99c114ae70ef2);
    check("s1 server seed", seed_srv, 64'h1be99c114ae70ef2);
    if (seed_tag == 64'h1be99c114ae70ef2) n_seed_upd++;

    // 2: from the updated seed
    session(cyc);
    check("session 2 cycles", word_t'(cyc), word_t'(SESSION_CYCLES));
    check_obs("s2", 64'h09ddca69b518f10d, 64'h4153c59e2ac18e56, 64'h09ddca69b518f10d,
              64'h1f45b271bc8583c7, 64'h1f45b271bc8583c7, 64'he3a1292b85e305ae,
              64'h0e54b271437a6d29, 64'h1f45b271bc8583c7, 64'hffffffffffffffff,
              64'hf1ab4d8ebc8592d6, 64'hf1ab4d8ebc8592d6);
    check_flags("s2", 1, 1, 1);
    if (seed_srv == 64'hf1ab4d8ebc8592d6) n_seed_upd++;

    // 3: database holds a wrong tag ID -> tag rejected, seeds desynchronize
    id_tag_srv = 64'h0123456789abcdef;
    session(cyc);
    check_flags("s3", 1, 0, 0);
    check("s3 ID_match is still the tag's ID", obs.id_match, IDT);
    checks++;
    if (seed_tag == seed_srv) begin
      failures++; $display("FAIL s3 seeds should differ");
    end
    id_tag_srv = IDT;

    // 4: desynchronized seeds -> reader rejected at the tag
    session(cyc);
    check_flags("s4", 0, 0, 0);
    // the server never got T_R and is still waiting for it
    s4_server_left_waiting = !reader_auth && (obs.server_cipher2 != obs.tag_cipher);
    checks++;
    if (obs.tag_cipher == obs.reader_cipher) begin
      failures++; $display("FAIL s4 T_C should differ from R_C");
    end

    // 5: re-initialize both seeds (server restarts while waiting for T_R)
    seed = 64'h0f0f0f0f0f0f0f0f;
    do_init();
    session(cyc);
    check("session 5 cycles", word_t'(cyc), word_t'(SESSION_CYCLES));
    check_flags("s5", 1, 1, 1);
    if (s4_server_left_waiting && tag_auth) n_restart++;
    check("s5 Server_data", obs.server_data, 64'h0f0f0f0f0f0f0f0f ^ IDR);
    check("s5 seeds equal", seed_tag, seed_srv);
    check("s5 tag seed is R_C ^ K1", seed_tag, obs.reader_cipher ^ K[63:0]);

    // 6: reader with a wrong key
    key_rdr = ~K;
    session(cyc);
    check_flags("s6", 0, 0, 0);
    key_rdr = K;

    $display("mechanisms: reader_ok=%0d reader_rej=%0d tag_ok=%0d tag_rej=%0d seed_upd=%0d sync=%0d init=%0d restart=%0d",
             n_reader_ok, n_reader_rej, n_tag_ok, n_tag_rej, n_seed_upd, n_sync, n_init, n_restart);
    checks++; if (n_reader_ok == 0)  begin failures++; $display("FAIL no reader authentication"); end
    checks++; if (n_reader_rej == 0) begin failures++; $display("FAIL no reader rejection"); end
    checks++; if (n_tag_ok == 0)     begin failures++; $display("FAIL no tag authentication"); end
    checks++; if (n_tag_rej == 0)    begin failures++; $display("FAIL no tag rejection"); end
    checks++; if (n_seed_upd == 0)   begin failures++; $display("FAIL no seed update"); end
    checks++; if (n_sync == 0)       begin failures++; $display("FAIL no synchronization"); end
    checks++; if (n_init == 0)       begin failures++; $display("FAIL no seed initialization"); end
    checks++; if (n_restart == 0)    begin failures++; $display("FAIL no server restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
