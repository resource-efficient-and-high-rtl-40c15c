// prince_cipher - pipelined PRINCE block cipher, encryption and decryption.
//
// Encrypts (mode_i = 1) or decrypts (mode_i = 0) one 64-bit block under a
// 128-bit key with one shared datapath. It is built from four units, as in
// the cipher's architecture: key generation (prince_keygen), register
// updation (prince_regs), the pipelined datapath (prince_datapath) and the
// controller (prince_fsm).
//
// Timing: pulse start_i for one cycle while busy_o is low, with pt_i, key_i
// and mode_i valid in that cycle; they are registered there and need not be
// held. The result is on ct_o while done_o is high, exactly four cycles after
// the start cycle. A new operation can start in the cycle after done_o, so
// one block is processed every five cycles. start_i while busy is ignored.
module prince_cipher
  import prince_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start_i,
  input  logic  mode_i,
  input  key_t  key_i,
  input  word_t pt_i,
  output word_t ct_o,
  output logic  done_o,
  output logic  busy_o
);

  word_t kn0, kn1, kns;
  word_t st_reg, kr0, kr1, krs, r3_reg, mr_reg, r8_reg;
  word_t r3_new, mr_new, r8_new, st_new, out;
  logic  st_en, k_en, c_en, i_s, u_s;
  ctrl_state_t c_reg, c_new;

  prince_keygen u_keygen (
    .key_i (key_i), .mode_i(mode_i),
    .kn0_o (kn0),   .kn1_o (kn1),   .kns_o(kns)
  );

  prince_regs u_regs (
    .clk      (clk),     .rst_n    (rst_n),
    .st_en_i  (st_en),   .st_new_i (st_new),
    .k_en_i   (k_en),    .kn0_i    (kn0),    .kn1_i(kn1), .kns_i(kns),
    .r3_new_i (r3_new),  .mr_new_i (mr_new), .r8_new_i(r8_new),
    .c_en_i   (c_en),    .c_new_i  (c_new),
    .st_reg_o (st_reg),  .kr0_o    (kr0),    .kr1_o(kr1), .krs_o(krs),
    .r3_reg_o (r3_reg),  .mr_reg_o (mr_reg), .r8_reg_o(r8_reg),
    .c_reg_o  (c_reg)
  );

  prince_datapath u_datapath (
    .pt_i     (pt_i),    .i_s_i    (i_s),    .u_s_i   (u_s),
    .st_reg_i (st_reg),  .kr0_i    (kr0),    .kr1_i   (kr1),    .krs_i(krs),
    .r3_reg_i (r3_reg),  .mr_reg_i (mr_reg), .r8_reg_i(r8_reg),
    .r3_new_o (r3_new),  .mr_new_o (mr_new), .r8_new_o(r8_new),
    .out_o    (out),     .st_new_o (st_new),
    .st_en_o  (st_en),   .k_en_o   (k_en)
  );

  prince_fsm u_fsm (
    .start_i (start_i), .c_reg_i(c_reg), .c_new_o(c_new), .c_en_o(c_en),
    .i_s_o   (i_s),     .u_s_o  (u_s),   .done_o (done_o), .busy_o(busy_o)
  );

  assign ct_o = out;

  // An accepted start produces done exactly four cycles later.
  property p_latency;
    @(posedge clk) disable iff (!rst_n) (start_i && !busy_o) |-> ##4 done_o;
  endproperty
  a_latency: assert property (p_latency);

  // done is a single-cycle pulse.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done_o |=> !done_o);

endmodule
