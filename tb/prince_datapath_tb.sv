// prince_datapath_tb - checks each of the four pipeline stages of the
// datapath against intermediate values (after R3, after the middle round,
// after R8, final output) from an independent software model, for one
// encryption and one decryption key set, and checks the state/key enables
// and the next-state selection in the initialization and updation states.
module prince_datapath_tb;
  import prince_pkg::*;

  int checks = 0, failures = 0;
  word_t pt, st_reg, kr0, kr1, krs, r3_reg, mr_reg, r8_reg;
  logic  i_s, u_s;
  word_t r3_new, mr_new, r8_new, out, st_new;
  logic  st_en, k_en;

  prince_datapath dut (
    .pt_i(pt), .i_s_i(i_s), .u_s_i(u_s), .st_reg_i(st_reg),
    .kr0_i(kr0), .kr1_i(kr1), .krs_i(krs),
    .r3_reg_i(r3_reg), .mr_reg_i(mr_reg), .r8_reg_i(r8_reg),
    .r3_new_o(r3_new), .mr_new_o(mr_new), .r8_new_o(r8_new),
    .out_o(out), .st_new_o(st_new), .st_en_o(st_en), .k_en_o(k_en)
  );

  // {input block, kr0, kr1, krs, after R3, after middle, after R8, out}
  typedef struct { word_t p, k0, k1, ks, r3, mr, r8, out; } vec_t;
  vec_t vecs [2] = '{
    '{64'hf2a74de452e6b438, 64'h0c5c7fd0a6a3a450, 64'h6513270e269e0d37, 64'h062e3fe85351d228,
      64'h93b7b12e722588f2, 64'hbf5d8d10e51a5c1f, 64'h7f94fb14b4269f10, 64'h6d8b4bf4bbaf7022},
    '{64'hd23f0824128b2f33, 64'h4a98cc2eaecee4fd, 64'hd8b4c1a64053c0f6, 64'h9531985d5d9dc9f8,
      64'hccb1d89afa6bacd6, 64'h41c76cead3007f29, 64'h627701afb6d1d3cd, 64'h4d1c70e9a66b6406}
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
      pt = 64'h0123456789abcdef;
      i_s = 0; u_s = 0;
      st_reg = vecs[i].p; kr0 = vecs[i].k0; kr1 = vecs[i].k1; krs = vecs[i].ks;
      r3_reg = vecs[i].r3; mr_reg = vecs[i].mr; r8_reg = vecs[i].r8;
      #1;
      check("stage 1 (R3)", r3_new, vecs[i].r3);
      check("stage 2 (middle)", mr_new, vecs[i].mr);
      check("stage 3 (R8)", r8_new, vecs[i].r8);
      check("stage 4 (out)", out, vecs[i].out);
      check("no enable when idle", word_t'({st_en, k_en}), 64'd0);
      i_s = 1;
      #1;
      check("i_s selects plaintext", st_new, pt);
      check("i_s enables", word_t'({st_en, k_en}), 64'd3);
      i_s = 0; u_s = 1;
      #1;
      check("u_s selects Out", st_new, vecs[i].out);
      check("u_s enables state only", word_t'({st_en, k_en}), 64'd2);
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
