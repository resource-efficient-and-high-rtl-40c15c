// prince_fsm_tb - checks the controller's decoding in every state (next
// state, c_en, i_s, u_s, done, busy) and walks one full operation through a
// local copy of the control register, counting that done comes four steps
// after start.
module prince_fsm_tb;
  import prince_pkg::*;

  int checks = 0, failures = 0;
  logic start;
  ctrl_state_t c_reg, c_new;
  logic c_en, i_s, u_s, done, busy;

  prince_fsm dut (.start_i(start), .c_reg_i(c_reg), .c_new_o(c_new), .c_en_o(c_en),
                  .i_s_o(i_s), .u_s_o(u_s), .done_o(done), .busy_o(busy));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // expected {next, c_en, i_s, u_s, done, busy} per state and start
  task automatic expect_state(ctrl_state_t s, logic st, ctrl_state_t nx,
                              logic ce, logic is, logic us, logic dn, logic bz);
    c_reg = s; start = st;
    #1;
    check($sformatf("state %0d start %0d next", s, st), c_new, nx);
    check($sformatf("state %0d start %0d c_en", s, st), c_en, ce);
    check($sformatf("state %0d start %0d i_s", s, st), i_s, is);
    check($sformatf("state %0d start %0d u_s", s, st), u_s, us);
    check($sformatf("state %0d start %0d done", s, st), done, dn);
    check($sformatf("state %0d start %0d busy", s, st), busy, bz);
  endtask

  initial begin
    expect_state(ST_IDLE, 0, ST_IDLE, 0, 0, 0, 0, 0);
    expect_state(ST_IDLE, 1, ST_S0,   1, 1, 0, 0, 0);
    for (int st = 0; st < 2; st++) begin
      expect_state(ST_S0, st[0], ST_S1,   1, 0, 0, 0, 1);
      expect_state(ST_S1, st[0], ST_S2,   1, 0, 0, 0, 1);
      expect_state(ST_S2, st[0], ST_SU,   1, 0, 0, 0, 1);
      expect_state(ST_SU, st[0], ST_IDLE, 1, 0, 1, 1, 1);
    end
    // walk: count steps from start to done
    begin
      int steps;
      c_reg = ST_IDLE; start = 1; steps = 0;
      #1;
      while (!done && steps < 20) begin
        if (c_en) c_reg = c_new;
        start = 0;
        steps++;
        #1;
      end
      check("steps from start to done", steps, 4);
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
