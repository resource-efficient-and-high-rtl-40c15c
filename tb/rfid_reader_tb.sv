// rfid_reader_tb - checks the reader on its own: SD1 = D(SC1) and
// R_C = E(SD1 ^ ID_R) for two queries with values from an independent
// software model, the 9-cycle query-to-R_C timing, and the one-cycle
// forwarding of the tag response.
module rfid_reader_tb;
  import prince_pkg::*;

  localparam key_t K = 128'haaaabbbbccccddddeeeeffff00001111;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  msg_t query = '0, rc, tr_in = '0, tr_out;
  word_t sd1, rcv;

  rfid_reader dut (
    .clk(clk), .rst_n(rst_n), .key_i(K), .id_reader_i(64'h12345678ffffffff),
    .query_i(query), .rc_o(rc), .tr_i(tr_in), .tr_o(tr_out),
    .decipher1_o(sd1), .reader_cipher_o(rcv)
  );

  always #5 clk = ~clk;

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  task automatic ask(word_t sc1, word_t exp_sd1, word_t exp_rc);
    int n;
    @(negedge clk); query = '{valid: 1'b1, data: sc1};
    @(negedge clk); query = '0;
    n = 1;
    while (!rc.valid && n < 50) begin @(negedge clk); n++; end
    check("query to R_C cycles", word_t'(n), 64'd9);
    check("R_C", rc.data, exp_rc);
    check("R_C register", rcv, exp_rc);
    check("SD1", sd1, exp_sd1);
    @(negedge clk);
    check("R_C is a pulse", word_t'(rc.valid), 64'd0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    ask(64'h58df97781a447af7, 64'hb89efcd255555555, 64'hf50763ee4ae71fe3);
    ask(64'h4153c59e2ac18e56, 64'h09ddca69b518f10d, 64'h1f45b271bc8583c7);
    // forwarding
    @(negedge clk); tr_in = '{valid: 1'b1, data: 64'he2ac0e49748ca3c5};
    @(negedge clk); tr_in = '0;
    check("T_R forwarded", tr_out.data, 64'he2ac0e49748ca3c5);
    check("T_R forwarded valid", word_t'(tr_out.valid), 64'd1);
    @(negedge clk);
    check("T_R forwarded once", word_t'(tr_out.valid), 64'd0);
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
