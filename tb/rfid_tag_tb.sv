// rfid_tag_tb - checks the tag on its own: T_C = E(S), reader
// authentication with a correct R_C (seed update to US_T = R_C ^ K1,
// response T_R = E(US_T ^ ID_T) five cycles after the comparison), and a
// wrong R_C (fail, no response, seed kept). Expected values come from an
// independent software model of the protocol.
module rfid_tag_tb;
  import prince_pkg::*;

  localparam key_t K = 128'haaaabbbbccccddddeeeeffff00001111;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init = 0, start = 0;
  msg_t rc = '0, tr;
  word_t tc, trv, ust, seed;
  logic rauth, fail;
  int n_tr = 0;

  rfid_tag dut (
    .clk(clk), .rst_n(rst_n), .init_i(init), .start_i(start), .key_i(K),
    .seed_init_i(64'haaaaaaaaaaaaaaaa), .id_tag_i(64'hffffffffffffffff),
    .rc_i(rc), .tr_o(tr), .tag_cipher_o(tc), .tag_response_o(trv),
    .updated_seed_o(ust), .seed_o(seed), .reader_auth_o(rauth), .fail_o(fail)
  );

  always #5 clk = ~clk;
  always @(negedge clk) if (tr.valid) n_tr++;

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  // start a session, deliver R_C after 'delay' cycles, return cycles from
  // R_C to the response (or to the end of the wait)
  task automatic run(word_t rcv, int delay, output int n);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (delay) @(negedge clk);
    rc = '{valid: 1'b1, data: rcv};
    @(negedge clk); rc = '0;
    n = 1;
    while (!tr.valid && !fail && n < 50) begin @(negedge clk); n++; end
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;

    run(64'hf50763ee4ae71fe3, 12, n);
    check("T_C", tc, 64'hf50763ee4ae71fe3);
    check("R_C to T_R cycles", word_t'(n), 64'd6);
    check("T_R", tr.data, 64'he2ac0e49748ca3c5);
    check("reader authenticated", word_t'({rauth, fail}), 64'b10);
    check("US_T", ust, 64'h1be99c114ae70ef2);
    check("seed updated", seed, 64'h1be99c114ae70ef2);

    // R_C arriving before T_C is ready is kept and used
    run(64'h1f45b271bc8583c7, 0, n);
    check("early R_C: T_C", tc, 64'h1f45b271bc8583c7);
    check("early R_C: T_R", tr.data, 64'he3a1292b85e305ae);
    check("early R_C: seed", seed, 64'hf1ab4d8ebc8592d6);

    // wrong R_C
    run(64'h0123456789abcdef, 12, n);
    check("wrong R_C rejected", word_t'({rauth, fail}), 64'b01);
    repeat (8) @(negedge clk);
    check("responses sent", word_t'(n_tr), 64'd2);
    check("seed kept", seed, 64'hf1ab4d8ebc8592d6);

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
