// prince_regs_tb - checks the register updation unit: reset values, round
// registers loading every cycle, and the state, key and control registers
// loading only when their enable is high and holding otherwise.
module prince_regs_tb;
  import prince_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic st_en, k_en, c_en;
  word_t st_new, kn0, kn1, kns, r3_new, mr_new, r8_new;
  ctrl_state_t c_new;
  word_t st_reg, kr0, kr1, krs, r3_reg, mr_reg, r8_reg;
  ctrl_state_t c_reg;

  // expected register contents, kept by the testbench
  word_t e_st, e_k0, e_k1, e_ks, e_r3, e_mr, e_r8;
  ctrl_state_t e_c;

  prince_regs dut (
    .clk(clk), .rst_n(rst_n), .st_en_i(st_en), .st_new_i(st_new),
    .k_en_i(k_en), .kn0_i(kn0), .kn1_i(kn1), .kns_i(kns),
    .r3_new_i(r3_new), .mr_new_i(mr_new), .r8_new_i(r8_new),
    .c_en_i(c_en), .c_new_i(c_new),
    .st_reg_o(st_reg), .kr0_o(kr0), .kr1_o(kr1), .krs_o(krs),
    .r3_reg_o(r3_reg), .mr_reg_o(mr_reg), .r8_reg_o(r8_reg), .c_reg_o(c_reg)
  );

  always #5 clk = ~clk;

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %016h expected %016h", what, got, exp);
    end
  endtask

  function automatic word_t rnd64();
    return {$urandom, $urandom};
  endfunction

  task automatic check_all(string when);
    check({when, " st_reg"}, st_reg, e_st);
    check({when, " kr0"}, kr0, e_k0);
    check({when, " kr1"}, kr1, e_k1);
    check({when, " krs"}, krs, e_ks);
    check({when, " r3_reg"}, r3_reg, e_r3);
    check({when, " mr_reg"}, mr_reg, e_mr);
    check({when, " r8_reg"}, r8_reg, e_r8);
    check({when, " c_reg"}, word_t'(c_reg), word_t'(e_c));
  endtask

  initial begin
    st_en = 0; k_en = 0; c_en = 0;
    st_new = rnd64(); kn0 = rnd64(); kn1 = rnd64(); kns = rnd64();
    r3_new = rnd64(); mr_new = rnd64(); r8_new = rnd64(); c_new = ST_S1;
    e_st = '0; e_k0 = '0; e_k1 = '0; e_ks = '0; e_r3 = '0; e_mr = '0; e_r8 = '0; e_c = ST_IDLE;
    repeat (2) @(posedge clk);
    #1 check_all("reset");
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      st_en  = $urandom_range(0, 1);
      k_en   = $urandom_range(0, 1);
      c_en   = $urandom_range(0, 1);
      st_new = rnd64(); kn0 = rnd64(); kn1 = rnd64(); kns = rnd64();
      r3_new = rnd64(); mr_new = rnd64(); r8_new = rnd64();
      c_new  = ctrl_state_t'($urandom_range(0, 4));
      e_r3 = r3_new; e_mr = mr_new; e_r8 = r8_new;
      if (st_en) e_st = st_new;
      if (k_en) begin e_k0 = kn0; e_k1 = kn1; e_ks = kns; end
      if (c_en) e_c = c_new;
      @(posedge clk);
      #1 check_all("step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
